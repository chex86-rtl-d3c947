// Host-core model used by tb_chex86_top (included inside the testbench
// module). It keeps architectural register values and a data memory, issues
// micro-ops with increasing sequence numbers, executes any injected capability
// micro-op on the capability unit, validates loads on the alias unit, sends
// stores to the store PID buffer, and commits in order. While the front end
// stalls, the model retires the oldest uncommitted micro-op, like a back end
// draining. Event counters are kept in the including module.
logic [63:0] regv [NREG];
logic [63:0] dmem [logic [63:0]];
seq_t next_seq, cm_next;

task automatic msr(logic [11:0] a, logic [63:0] d);
  @(negedge clk); msr_we = 1; msr_addr = a; msr_wdata = d; @(negedge clk); msr_we = 0;
endtask

task automatic commit_one();
  cm_en = 1; cm_seq = cm_next; cm_next = cm_next + 1'b1; @(negedge clk); cm_en = 0;
endtask

task automatic commit_all();
  while (cm_next != next_seq) commit_one();
  repeat (4) @(negedge clk);
  while (dut.u_sb.dr_valid || dut.u_alias.st_q != dut.u_alias.S_IDLE) @(negedge clk);
endtask

task automatic host_squash(seq_t s);
  sq_en = 1; sq_seq = s; @(negedge clk); sq_en = 0;
  n_hsq++; next_seq = s + 1'b1;
endtask

// run a capability micro-op; returns its exception
task automatic cap_exec(capuop_t c, logic [63:0] value, output exc_e e);
  automatic int cyc = 0;
  cx_valid = 1; cx_op = c.op; cx_pid = c.pid; cx_value = value; cx_size = 4'd8; cx_write = c.is_write;
  while (!cx_ready) @(negedge clk);
  @(negedge clk); cx_valid = 0;
  while (!cx_done) begin @(negedge clk); cyc++; end
  e = cx_exc; last_cap_cyc = cyc;
  `CHECK_EQ(cx_done_pid, c.pid, "capability response PID")
  @(negedge clk);
endtask

// issue one micro-op; ea is the effective address for loads and stores.
// Returns the annotation and the exception of an injected micro-op.
task automatic issue(uop_op_e op, logic imm, reg_t dst, reg_t s1, reg_t s2, reg_t base,
                     logic [63:0] ea, va_t pc, output ann_t a, output exc_e e);
  automatic capuop_t c; automatic logic iv; automatic seq_t s;
  automatic int tries = 0;
  forever begin
    s = next_seq;
    uop_valid = 1;
    uop = '{pc: pc, first: 1'b1, op: op, imm: imm, wr: (op != UOP_ST), dst: dst,
            src1: s1, src2: s2, base: base, seq: s};
    #1;
    while (uop_stall) begin
      n_stall++;
      if (cm_next != next_seq) commit_one(); else @(negedge clk);
      #1;
    end
    a = uop_ann; iv = inj_valid; c = inj;
    @(negedge clk); uop_valid = 0;
    next_seq = next_seq + 1'b1;
    e = EXC_NONE;
    if (iv) begin
      n_inj[c.op]++;
      cap_exec(c, (c.op == CAP_CHECK) ? ea : regv[c.reg_opnd], e);
    end
    if (op == UOP_ST) begin
      dmem[ea] = regv[s1];
      st_valid = 1; st_seq = s; st_addr = ea; st_pid = a.st_pid; st_ah = ea[31];
      @(negedge clk); st_valid = 0;
      break;
    end else if (op == UOP_LD) begin
      regv[dst] = dmem.exists(ea) ? dmem[ea] : 64'd0;
      ld_valid = 1; ld_addr = ea; ld_pc = pc; ld_seq = s; ld_dst = dst; ld_pred = a.pred_pid; ld_ah = ea[31];
      while (!ld_ready) @(negedge clk);
      @(negedge clk); ld_valid = 0;
      while (!rl_valid) @(negedge clk);
      last_rl = rl_kind; last_actual = rl_actual;
      n_rl[rl_kind]++;
      if (flush_valid) begin
        `CHECK_EQ(flush_seq, s, "flush restarts at the load")
        next_seq = s;                      // replay from the load
        @(negedge clk);
        tries++;
        if (tries > 2) break;
        continue;
      end
      @(negedge clk);
      break;
    end else begin
      if (op == UOP_MOV || op == UOP_ADD || op == UOP_LEA) regv[dst] = regv[s1] + ea;
      else if (op != UOP_SUB && op != UOP_AND) regv[dst] = ea;
      break;
    end
  end
endtask
