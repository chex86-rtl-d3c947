// Program run by tb_chex86_top (included inside the testbench module): the
// configuration and the end-to-end scenario with its checks.
task automatic do_malloc(logic [63:0] size, logic [63:0] base, output pid_t p);
  automatic ann_t a; automatic exc_e e;
  regv[RDI] = size;
  issue(UOP_OTHER, 0, R14, R14, R14, R14, 64'd0, MALLOC, a, e);             // entry
  `CHECK_EQ(e, EXC_NONE, "capGen.Begin")
  regv[RAX] = base;
  issue(UOP_OTHER, 0, R14, R14, R14, R14, 64'd0, MALLOC + 64'h10, a, e);    // return
  `CHECK_EQ(e, EXC_NONE, "capGen.End")
  regv[RAX] = base;
  p = dut.u_inj.pend_alloc_q;
endtask

task automatic do_free(reg_t r, output exc_e e1);
  automatic ann_t a; automatic exc_e e;
  issue(UOP_MOV, 0, RDI, r, r, r, 64'd0, 64'h5000, a, e);
  issue(UOP_OTHER, 0, R14, R14, R14, R14, 64'd0, FREE, a, e1);
  issue(UOP_OTHER, 0, R14, R14, R14, R14, 64'd0, FREE + 64'h10, a, e);
endtask

initial begin
  automatic ann_t a; automatic exc_e e; automatic pid_t p1, p2;
  for (int i = 0; i < NREG; i++) regv[i] = '0;
  for (int i = 0; i < 8; i++) begin n_inj[i] = 0; n_exc[i] = 0; end
  for (int i = 0; i < 4; i++) n_rl[i] = 0;
  next_seq = 16'hFFF0; cm_next = 16'hFFF0;   // sequence numbers wrap during the run
  regv[RSP] = 64'h8FF0_0000;
  repeat (3) @(negedge clk); rst_n = 1;
  // ---- configuration ----
  msr(MSR_CAP_TBL, 64'h4000_0000);
  msr(MSR_ALIAS_ROOT, 64'h10_0000);
  msr(MSR_ALIAS_ALLOC, 64'h20_0000);
  msr(MSR_HEAPFN + 0, MALLOC); msr(MSR_HEAPFN + 1, MALLOC + 64'h10); msr(MSR_HEAPFN + 2, 64'(HF_ALLOC));
  msr(MSR_HEAPFN + 3, 64'({8'(RAX), 8'(RDI)}));
  msr(MSR_HEAPFN + 4, FREE); msr(MSR_HEAPFN + 5, FREE + 64'h10); msr(MSR_HEAPFN + 6, 64'(HF_FREE));
  msr(MSR_HEAPFN + 7, 64'({8'(RAX), 8'(RDI)}));
  msr(MSR_MODE, 64'(MODE_ALL));
  @(negedge clk); msr_addr = MSR_HEAPFN + 2; #1;
  `CHECK_EQ(msr_rdata, 64'(HF_ALLOC), "MSR read back")
  // ---- malloc and pointer propagation ----
  do_malloc(64, 64'h8000_0000, p1);
  `CHECK(p1 != PID_NONE, "allocation got a PID")
  issue(UOP_MOV, 0, RBX, RAX, RAX, RAX, 0, 64'h5010, a, e);
  `CHECK_EQ(a.dst_pid, p1, "mov propagates the PID")
  issue(UOP_ADD, 1, RCX, RBX, RBX, RBX, 8, 64'h5014, a, e);
  `CHECK_EQ(a.dst_pid, p1, "add r,imm propagates the PID")
  issue(UOP_LD, 0, R8, R8, R8, RCX, 64'h8000_0008, 64'h5018, a, e);
  `CHECK(a.deref && a.deref_pid == p1 && e == EXC_NONE, "checked in-bounds load")
  `CHECK_EQ(last_cap_cyc, 2, "capability cache hit answers two cycles after acceptance")
  issue(UOP_LD, 0, R8, R8, R8, RCX, 64'h8000_0040, 64'h501C, a, e);
  `CHECK_EQ(e, EXC_OOB, "out-of-bounds load detected")
  issue(UOP_ST, 0, R8, RBX, RBX, RCX, 64'h8000_0038, 64'h5020, a, e);
  `CHECK(a.is_write && e == EXC_NONE, "checked in-bounds store")
  // ---- spill and reload: predictor learns ----
  issue(UOP_ST, 0, R8, RBX, RBX, RSP, SLOT, 64'h5024, a, e);
  `CHECK(a.st_valid && a.st_pid == p1 && !a.deref, "spill carries the PID")
  issue(UOP_LD, 0, RDX, RDX, RDX, RSP, SLOT, RELOAD_PC, a, e);   // forwarded from the store buffer
  `CHECK(last_rl == RL_OK && last_actual == p1 && a.pred_pid == p1, "missed reload flushed and replayed")
  `CHECK(n_rl[RL_P0AN] == 1 && n_flush == 1, "one flush")
  commit_all();
  issue(UOP_LD, 0, RDX, RDX, RDX, RSP, SLOT, RELOAD_PC, a, e);   // from the alias cache
  `CHECK(last_rl == RL_OK && a.pred_pid == p1, "trained predictor")
  issue(UOP_MOV, 0, R9, RDX, RDX, RDX, 0, 64'h5028, a, e);
  `CHECK_EQ(a.dst_pid, p1, "reloaded pointer propagates")
  // ---- wrong PID (PMAN) ----
  do_malloc(128, 64'h8000_1000, p2);
  issue(UOP_ST, 0, R8, RAX, RAX, RSP, SLOT, 64'h502C, a, e);
  commit_all();
  issue(UOP_LD, 0, RDX, RDX, RDX, RSP, SLOT, RELOAD_PC, a, e);
  `CHECK(last_rl == RL_PMAN && a.pred_pid == p1 && last_actual == p2, "wrong PID detected")
  issue(UOP_MOV, 0, R9, RDX, RDX, RDX, 0, 64'h5030, a, e);
  `CHECK_EQ(a.dst_pid, p2, "tag fixed with the actual PID")
  // ---- false reload (PNA0) -> zero idiom ----
  issue(UOP_OTHER, 0, R11, R11, R11, R11, 64'd77, 64'h5034, a, e);
  issue(UOP_ST, 0, R8, R11, R11, RSP, SLOT, 64'h5038, a, e);
  commit_all();
  issue(UOP_LD, 0, RDX, RDX, RDX, RSP, SLOT, RELOAD_PC, a, e);
  `CHECK(last_rl == RL_PNA0 && n_zi == 1, "false reload turned into a zero idiom")
  // ---- victim cache: three spills to one alias-cache set ----
  issue(UOP_ST, 0, R8, RBX, RBX, RSP, SLOT + 64'h400, 64'h503C, a, e);
  issue(UOP_ST, 0, R8, RAX, RAX, RSP, SLOT + 64'h800, 64'h5040, a, e);
  commit_all();
  issue(UOP_LD, 0, R10, R10, R10, RSP, SLOT, 64'h3100, a, e);
  `CHECK(n_vch >= 1 && last_actual == PID_NONE, "victim cache hit")
  // ---- remote alias invalidation forces a walk ----
  begin
    automatic int w0 = n_walk;
    @(negedge clk); alias_inv_in_en = 1; alias_inv_in_addr = SLOT + 64'h400; @(negedge clk); alias_inv_in_en = 0;
    issue(UOP_LD, 0, R10, R10, R10, RSP, SLOT + 64'h400, 64'h3200, a, e);
    `CHECK(n_walk > w0 && last_actual == p1, "walk finds the spilled PID")
  end
  // ---- capacity: more live allocations than cache lines -> miss ----
  begin
    automatic int m0 = n_cmiss; automatic pid_t pk;
    for (int k = 0; k < 66; k++) do_malloc(32, 64'h9000_0000 + 64'(k) * 64'h40, pk);
    issue(UOP_LD, 0, R8, R8, R8, R9, 64'h8000_1008, 64'h5044, a, e);
    `CHECK(e == EXC_NONE && n_cmiss == m0 + 1, "evicted capability refetched from the table")
    // remote free of the last allocation: the local copy is no longer valid
    regv[R10] = regv[RAX];
    issue(UOP_MOV, 0, R10, RAX, RAX, RAX, 0, 64'h5048, a, e);
    @(negedge clk); cap_inv_in_en = 1; cap_inv_in_pid = pk; @(negedge clk); cap_inv_in_en = 0;
    issue(UOP_LD, 0, R8, R8, R8, R10, regv[R10], 64'h504C, a, e);
    `CHECK_EQ(e, EXC_UAF, "remote free seen by this core")
  end
  // ---- front-end stall and host squash ----
  for (int i = 0; i < 10; i++) issue(UOP_MOV, 0, R13, RBX, RBX, RBX, 0, 64'h5100, a, e);
  `CHECK(n_stall > 0, "tag file fills and stalls the front end")
  commit_all();
  issue(UOP_MOV, 0, R13, R9, R9, R9, 0, 64'h5104, a, e);
  `CHECK_EQ(a.dst_pid, p2, "speculative tag")
  host_squash(next_seq - 16'd2);
  issue(UOP_MOV, 0, R12, R13, R13, R13, 0, 64'h5108, a, e);
  `CHECK_EQ(a.dst_pid, p1, "squash restores the older tag")
  // ---- free, use after free, double free, invalid free ----
  do_free(RBX, e);
  `CHECK(e == EXC_NONE && n_cinv >= 1, "free invalidates other cores' copies")
  issue(UOP_LD, 0, R8, R8, R8, RBX, 64'h8000_0000, 64'h5110, a, e);
  `CHECK_EQ(e, EXC_UAF, "use after free")
  do_free(RBX, e);
  `CHECK_EQ(e, EXC_DOUBLE_FREE, "double free")
  do_free(R11, e);
  `CHECK_EQ(e, EXC_INVALID_FREE, "free of a non-pointer")
  // ---- forged pointer ----
  issue(UOP_LIMM, 0, R12, R12, R12, R12, 64'h8000_1000, 64'h5114, a, e);
  issue(UOP_LD, 0, R8, R8, R8, R12, 64'h8000_1000, 64'h5118, a, e);
  `CHECK_EQ(e, EXC_WILD, "dereference of a forged pointer")
  // ---- region mode: checks only inside [0x6000,0x7000) ----
  msr(MSR_REGION_LO, 64'h6000); msr(MSR_REGION_HI, 64'h7000); msr(MSR_MODE, 64'(MODE_REGION));
  begin
    automatic int c0 = n_inj[CAP_CHECK];
    issue(UOP_LD, 0, R8, R8, R8, RAX, 64'h8000_1000, 64'h5120, a, e);
    `CHECK_EQ(n_inj[CAP_CHECK], c0, "no check outside the region")
    issue(UOP_LD, 0, R8, R8, R8, RAX, 64'h8000_1000, 64'h6000, a, e);
    `CHECK_EQ(n_inj[CAP_CHECK], c0 + 1, "check inside the region")
  end
  commit_all();
  // ---- rule checker: right and wrong tracked PID ----
  for (int k = 0; k < 2; k++) begin
    @(negedge clk); chk_valid = 1; chk_pc = 64'h5200; chk_value = 64'h8000_1010; chk_pred = (k == 1) ? PID_NONE : p2;
    while (!chk_ready) @(negedge clk);
    @(negedge clk); chk_valid = 0;
    while (!chk_done) @(negedge clk);
    `CHECK(chk_actual == p2 && chk_mismatch == (k == 1) && chk_dump_pc == 64'h5200, "checker finds the block")
  end
  @(negedge clk);
  // ---- every mechanism must have happened ----
  `CHECK(n_stall > 0, "mechanism: stall")
  `CHECK(n_flush > 0, "mechanism: flush")
  `CHECK(n_zi > 0, "mechanism: zero idiom")
  `CHECK(n_rl[RL_PMAN] > 0, "mechanism: PID fix")
  `CHECK(n_hsq > 0, "mechanism: host squash")
  `CHECK(n_chit > 0 && n_cmiss > 0, "mechanism: capability cache hit and miss")
  `CHECK(n_ach > 0 && n_vch > 0 && n_walk > 0, "mechanism: alias cache, victim cache, walk")
  `CHECK(n_cinv > 0 && n_ainv > 0, "mechanism: invalidations")
  `CHECK(chk_count > 0, "mechanism: checker report")
  for (int k = 1; k < 6; k++) `CHECK(n_inj[k] > 0, $sformatf("mechanism: injected op %0d", k))
  `CHECK(n_exc[EXC_OOB] > 0 && n_exc[EXC_UAF] > 0 && n_exc[EXC_WILD] > 0 &&
         n_exc[EXC_DOUBLE_FREE] > 0 && n_exc[EXC_INVALID_FREE] > 0, "mechanism: each violation")
  $display("events: stall=%0d flush=%0d zi=%0d pman=%0d chit=%0d cmiss=%0d ach=%0d vch=%0d walk=%0d",
           n_stall, n_flush, n_zi, n_rl[RL_PMAN], n_chit, n_cmiss, n_ach, n_vch, n_walk);
  `TB_FINISH
end
