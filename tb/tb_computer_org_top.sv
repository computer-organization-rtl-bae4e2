// tb_computer_org_top: end-to-end test of the whole top level at its default
// parameters. The processor runs the Fibonacci program (N = 4, then N = 0..7)
// and the exercise program, each compared word for word and cycle for cycle
// with the reference model; meanwhile the LD/OE register, the 4 x 4
// register file, the 1024 x 4 SRAM and the 32-bit ripple adder are driven
// with random traffic and checked against models. Every mechanism (each
// instruction path, slt both ways, beq taken and not, halt, register hold
// and release, simultaneous register-file read/write, SRAM read and write,
// adder carry out) must occur at least once.
module tb_computer_org_top;
  import r2000_pkg::*;

  typedef enum int {M_RTYPE, M_SLT_LT, M_SLT_GE, M_LW, M_SW, M_BEQ_T, M_BEQ_N,
                    M_ADDI, M_J, M_HALT, M_REG_HOLD, M_REG_HIZ, M_RF_RW,
                    M_SRAM_WR, M_SRAM_RD, M_ADD_COUT, M_NUM} mech_e;

  logic        clk = 1'b0;
  logic        r_reset = 1'b1, r_host_we = 1'b0;
  logic [7:0]  r_host_addr = '0;
  logic [31:0] r_host_wdata = '0, r_host_rdata, r_pc, r_ir;
  logic        r_halted;
  state_e      r_state;
  int          checks = 0, failures = 0;
  int unsigned mech [M_NUM];

  logic       reg8_ld = 0, reg8_oe = 0, reg8_q_en;
  logic [7:0] reg8_d = 0, reg8_q, reg8_model;
  logic       rf4_we = 0, rf4_re = 0, rf4_q_en;
  logic [1:0] rf4_wa = 0, rf4_ra = 0;
  logic [3:0] rf4_d = 0, rf4_q;
  logic [3:0] rf4_model [4];
  logic       sram_rd = 0, sram_wr = 0, sram_io_oe;
  logic [9:0] sram_a = 0;
  logic [3:0] sram_io_in = 0, sram_io_out;
  logic [3:0] sram_model [1024];
  bit         sram_valid [1024];
  logic [31:0] add_a = 0, add_b = 0, add_sum;
  logic       add_cin = 0, add_cout;
  bit         side_run = 1'b1;

  always #5 clk = ~clk;

  computer_org_top dut (
    .clk,
    .cpu_reset(r_reset), .cpu_host_we(r_host_we), .cpu_host_addr(r_host_addr),
    .cpu_host_wdata(r_host_wdata), .cpu_host_rdata(r_host_rdata),
    .cpu_halted(r_halted), .cpu_pc(r_pc), .cpu_ir(r_ir), .cpu_state(r_state),
    .reg8_ld, .reg8_oe, .reg8_d, .reg8_q, .reg8_q_en,
    .rf4_we, .rf4_wa, .rf4_d, .rf4_re, .rf4_ra, .rf4_q, .rf4_q_en,
    .sram_rd, .sram_wr, .sram_a, .sram_io_in, .sram_io_out, .sram_io_oe,
    .add_a, .add_b, .add_cin, .add_sum, .add_cout
  );

  function automatic void check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endfunction

  `include "r2000_run_if.svh"

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Side designs: random traffic every cycle while the processor runs.
  initial begin
    logic [32:0] e;
    // initialise the register and register file
    reg8_ld = 1; reg8_d = 8'h3c; rf4_we = 1;
    for (int i = 0; i < 4; i++) begin
      rf4_wa = 2'(i); rf4_d = 4'(i); rf4_model[i] = 4'(i);
      @(posedge clk); #2;
    end
    reg8_model = 8'h3c;
    while (side_run) begin
      reg8_ld = 1'($urandom); reg8_oe = 1'($urandom); reg8_d = 8'($urandom);
      rf4_we = 1'($urandom); rf4_wa = 2'($urandom); rf4_d = 4'($urandom);
      rf4_re = 1'($urandom); rf4_ra = 2'($urandom);
      sram_wr = 1'($urandom); sram_rd = 1'($urandom); sram_a = 10'($urandom % 64);
      sram_io_in = 4'($urandom);
      add_a = ($urandom % 4 == 0) ? 32'hffff_ffff : $urandom; add_b = $urandom; add_cin = 1'($urandom);
      #1;
      check(rf4_q_en == rf4_re && rf4_q == (rf4_re ? rf4_model[rf4_ra] : 4'd0), "rf4 read");
      if (rf4_re && rf4_we) mech[M_RF_RW]++;
      check(sram_io_oe == (sram_rd && !sram_wr), "sram io_oe");
      if (sram_rd && !sram_wr && sram_valid[sram_a]) begin
        check(sram_io_out == sram_model[sram_a], "sram read");
        mech[M_SRAM_RD]++;
      end
      e = 33'(add_a) + 33'(add_b) + 33'(add_cin);
      check({add_cout, add_sum} == e, "adder sum");
      if (add_cout) mech[M_ADD_COUT]++;
      @(posedge clk); #2;
      if (reg8_ld) reg8_model = reg8_d; else mech[M_REG_HOLD]++;
      if (!reg8_oe) mech[M_REG_HIZ]++;
      check(reg8_q_en == reg8_oe && reg8_q == (reg8_oe ? reg8_model : 8'd0), "reg8 output");
      if (rf4_we) rf4_model[rf4_wa] = rf4_d;
      if (sram_wr) begin
        sram_model[sram_a] = sram_io_in; sram_valid[sram_a] = 1'b1; mech[M_SRAM_WR]++;
      end
    end
  end

  initial begin
    r2000_ref_pkg::mem_t img;
    foreach (mech[i]) mech[i] = 0;
    // the program as given: N = 4
    r2000_ref_pkg::fib_program(img, 32'd4);
    load_and_run(img, "fib(4)");
    r_host_addr = 8'hff; #1;
    check(r_host_rdata == 32'd3, $sformatf("fib(4) result %0d, expected 3", r_host_rdata));
    for (int n = 0; n <= 7; n++) begin
      r2000_ref_pkg::fib_program(img, 32'(n));
      load_and_run(img, $sformatf("fib(%0d)", n));
    end
    r2000_ref_pkg::mix_program(img, 32'd3, 32'd11);
    load_and_run(img, "mix(3,11)");
    r2000_ref_pkg::mix_program(img, $urandom, $urandom);
    load_and_run(img, "mix(random)");
    side_run = 1'b0;
    @(posedge clk); #3;
    for (int i = 0; i < M_NUM; i++) begin
      check(mech[i] > 0, $sformatf("mechanism %s never happened", mech_e'(i)));
      $display("mechanism %-10s : %0d", mech_e'(i), mech[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
