// tb_r2000_system: end-to-end test of the R2000-subset processor. Programs are
// loaded through the host port, run to HALT, and compared with the
// instruction-level reference model in r2000_ref_pkg: every memory word
// afterwards, the exact number of clock cycles, and how often each
// multi-cycle path (slt taken/not, lw, sw, beq taken, j) was traversed.
// Programs: the Fibonacci loop for N = 0..10 and N = -1, and an exercise
// program using every instruction for several operand pairs.
module tb_r2000_system;
  import r2000_pkg::*;

  typedef enum int {M_RTYPE, M_SLT_LT, M_SLT_GE, M_LW, M_SW, M_BEQ_T, M_BEQ_N,
                    M_ADDI, M_J, M_HALT, M_NUM} mech_e;

  logic        clk = 1'b0;
  logic        r_reset = 1'b1, r_host_we = 1'b0;
  logic [7:0]  r_host_addr = '0;
  logic [31:0] r_host_wdata = '0, r_host_rdata, r_pc, r_ir;
  logic        r_halted;
  state_e      r_state;
  int          checks = 0, failures = 0;
  int unsigned mech [M_NUM];

  always #5 clk = ~clk;

  r2000_system dut (
    .clk, .reset(r_reset), .host_we(r_host_we), .host_addr(r_host_addr),
    .host_wdata(r_host_wdata), .host_rdata(r_host_rdata), .halted(r_halted),
    .pc(r_pc), .ir(r_ir), .state(r_state)
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

  initial begin
    r2000_ref_pkg::mem_t img;
    foreach (mech[i]) mech[i] = 0;
    for (int n = 0; n <= 10; n++) begin
      r2000_ref_pkg::fib_program(img, 32'(n));
      load_and_run(img, $sformatf("fib(%0d)", n));
      r_host_addr = 8'hff; #1;
      check(r_host_rdata == r2000_ref_pkg::fib(32'(n)),
            $sformatf("fib(%0d) = %0d", n, r_host_rdata));
    end
    r2000_ref_pkg::fib_program(img, 32'hffff_fffd);
    load_and_run(img, "fib(-3)");
    r2000_ref_pkg::mix_program(img, 32'd5, 32'd9);
    load_and_run(img, "mix(5,9)");
    r2000_ref_pkg::mix_program(img, 32'd7, 32'd7);
    load_and_run(img, "mix(7,7)");
    r2000_ref_pkg::mix_program(img, 32'h8000_0000, 32'h0000_0001);
    load_and_run(img, "mix(min,1)");
    for (int k = 0; k < 4; k++) begin
      r2000_ref_pkg::mix_program(img, $urandom, $urandom);
      load_and_run(img, $sformatf("mix(random %0d)", k));
    end
    for (int i = 0; i < M_NUM; i++) begin
      check(mech[i] > 0, $sformatf("mechanism %s never happened", mech_e'(i)));
      $display("mechanism %-9s : %0d", mech_e'(i), mech[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
