// Shared testbench tasks for driving an r2000_system-style processor through
// ports named clk, <P>reset, <P>host_we/addr/wdata/rdata, <P>halted,
// <P>state and <P>ir. Included inside a testbench module that declares
// those signals under the local names used below, plus 'checks' and
// 'failures' counters and a mech[] coverage array.
//
// load_and_run(img, exp_cycles, exp_img, st): loads img through the host
// port with the processor in reset, releases reset, counts clock cycles until
// halted, compares the cycle count and every memory word with the reference
// model's, and compares per-mechanism counts observed on state/ir with st.

task automatic load_image(input r2000_ref_pkg::mem_t img);
  r_reset = 1'b1;
  for (int i = 0; i < 256; i++) begin
    r_host_we    = 1'b1;
    r_host_addr  = 8'(i);
    r_host_wdata = img[i];
    @(posedge clk); #1;
  end
  r_host_we = 1'b0;
  @(posedge clk); #1;
endtask

task automatic load_and_run(input r2000_ref_pkg::mem_t img, input string name);
  r2000_ref_pkg::mem_t ref_img;
  r2000_ref_pkg::stats_t st;
  int unsigned cyc, o_slt_lt, o_slt_ge, o_lw, o_sw, o_beq_t, o_j, o_halt;
  ref_img = img;
  r2000_ref_pkg::run(ref_img, st);
  load_image(img);
  r_reset = 1'b0;
  cyc = 0; o_slt_lt = 0; o_slt_ge = 0; o_lw = 0; o_sw = 0; o_beq_t = 0; o_j = 0; o_halt = 0;
  while (!r_halted && cyc < 200000) begin
    // observe the state that is about to complete
    if (r_state == r2000_pkg::S_EXEC2 && r_ir[31:26] == 6'h00) o_slt_lt++;
    if (r_state == r2000_pkg::S_EXEC3 && r_ir[31:26] == 6'h00) o_slt_ge++;
    if (r_state == r2000_pkg::S_EXEC3 && r_ir[31:26] == 6'h23) o_lw++;
    if (r_state == r2000_pkg::S_EXEC2 && r_ir[31:26] == 6'h2b) o_sw++;
    if (r_state == r2000_pkg::S_EXEC2 && r_ir[31:26] == 6'h04) o_beq_t++;
    if (r_state == r2000_pkg::S_EXEC1 && r_ir[31:26] == 6'h02) o_j++;
    @(posedge clk); #1;
    cyc++;
  end
  if (r_halted) o_halt++;
  $display("%s: halted after %0d cycles, %0d instructions", name, cyc, st.instrs + 1);
  // stay halted for a few cycles
  repeat (3) @(posedge clk);
  #1;
  check(r_halted, $sformatf("%s: halted", name));
  check(cyc == st.cycles, $sformatf("%s: cycles %0d expected %0d", name, cyc, st.cycles));
  check(o_slt_lt == st.n_slt_lt && o_slt_ge == st.n_slt_ge, $sformatf("%s: slt outcomes", name));
  check(o_lw == st.n_lw && o_sw == st.n_sw, $sformatf("%s: load/store counts", name));
  check(o_beq_t == st.n_beq_taken && o_j == st.n_j, $sformatf("%s: branch/jump counts", name));
  r_reset = 1'b1;
  for (int i = 0; i < 256; i++) begin
    r_host_addr = 8'(i);
    #1;
    check(r_host_rdata == ref_img[i],
          $sformatf("%s: mem[%0d] = %h expected %h", name, i, r_host_rdata, ref_img[i]));
  end
  mech[M_RTYPE]    += st.n_rtype;
  mech[M_SLT_LT]   += o_slt_lt;
  mech[M_SLT_GE]   += o_slt_ge;
  mech[M_LW]       += o_lw;
  mech[M_SW]       += o_sw;
  mech[M_BEQ_T]    += o_beq_t;
  mech[M_BEQ_N]    += st.n_beq_not;
  mech[M_ADDI]     += st.n_addi;
  mech[M_J]        += o_j;
  mech[M_HALT]     += o_halt;
endtask
