// computer_org_top: top level holding the designs of this collection side
// by side. They share only the clock; each keeps its own ports:
//   cpu_*   the multi-cycle R2000-subset processor with its 256-word memory
//           (r2000_system), reset, host memory port and status outputs;
//   reg8_*  an 8-bit register with load and output enable (reg_ld_oe);
//   rf4_*   a 4 x 4 register file (regfile_4x4);
//   sram_*  a 1024 x 4 static RAM (sram_1024x4);
//   add_*   a 32-bit ripple-carry adder of full-adder slices (ripple_adder).
// Timing is that of each sub-design; nothing is added between them.
module computer_org_top
  import r2000_pkg::*;
#(
  parameter int unsigned MEM_ADDR_BITS = 8
) (
  input  logic                     clk,
  // R2000 processor
  input  logic                     cpu_reset,
  input  logic                     cpu_host_we,
  input  logic [MEM_ADDR_BITS-1:0] cpu_host_addr,
  input  logic [31:0]              cpu_host_wdata,
  output logic [31:0]              cpu_host_rdata,
  output logic                     cpu_halted,
  output logic [31:0]              cpu_pc,
  output logic [31:0]              cpu_ir,
  output state_e                   cpu_state,
  // 8-bit LD/OE register
  input  logic                     reg8_ld,
  input  logic                     reg8_oe,
  input  logic [7:0]               reg8_d,
  output logic [7:0]               reg8_q,
  output logic                     reg8_q_en,
  // 4 x 4 register file
  input  logic                     rf4_we,
  input  logic [1:0]               rf4_wa,
  input  logic [3:0]               rf4_d,
  input  logic                     rf4_re,
  input  logic [1:0]               rf4_ra,
  output logic [3:0]               rf4_q,
  output logic                     rf4_q_en,
  // 1024 x 4 SRAM
  input  logic                     sram_rd,
  input  logic                     sram_wr,
  input  logic [9:0]               sram_a,
  input  logic [3:0]               sram_io_in,
  output logic [3:0]               sram_io_out,
  output logic                     sram_io_oe,
  // 32-bit ripple adder
  input  logic [31:0]              add_a,
  input  logic [31:0]              add_b,
  input  logic                     add_cin,
  output logic [31:0]              add_sum,
  output logic                     add_cout
);

  r2000_system #(.MEM_ADDR_BITS(MEM_ADDR_BITS)) u_cpu (
    .clk, .reset(cpu_reset),
    .host_we(cpu_host_we), .host_addr(cpu_host_addr), .host_wdata(cpu_host_wdata),
    .host_rdata(cpu_host_rdata), .halted(cpu_halted),
    .pc(cpu_pc), .ir(cpu_ir), .state(cpu_state)
  );

  reg_ld_oe #(.WIDTH(8)) u_reg8 (
    .clk, .ld(reg8_ld), .oe(reg8_oe), .d(reg8_d), .q(reg8_q), .q_en(reg8_q_en)
  );

  regfile_4x4 #(.WORDS(4), .WIDTH(4)) u_rf4 (
    .clk, .we(rf4_we), .wa(rf4_wa), .d(rf4_d),
    .re(rf4_re), .ra(rf4_ra), .q(rf4_q), .q_en(rf4_q_en)
  );

  sram_1024x4 #(.ADDR_BITS(10), .WIDTH(4)) u_sram (
    .clk, .rd(sram_rd), .wr(sram_wr), .a(sram_a),
    .io_in(sram_io_in), .io_out(sram_io_out), .io_oe(sram_io_oe)
  );

  ripple_adder #(.WIDTH(32)) u_add (
    .a(add_a), .b(add_b), .cin(add_cin), .sum(add_sum), .cout(add_cout)
  );

endmodule
