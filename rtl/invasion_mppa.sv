// Processor array with decentralized resource exploration: top level.
//
// Every PE of a ROWS x COLS mesh has an invasion controller beside it that
// explores and claims free PEs in its neighbourhood on the PE's behalf. The
// document proposes two hard-wired controller flavours, one per strategy,
// and a programmable one; an array is built from one flavour. This top holds
// one mesh of each flavour side by side, each with its own PE ports: a plane
// of linear-invasion controllers (lin_*), a plane of rectangular-invasion
// controllers (rect_*) and a plane of programmable controllers (prog_*),
// whose common exploration program is loaded through prog_imem_* and started
// with prog_run. The PEs themselves are outside
// this design: their command and response links, their busy flags and the
// claim state reported back to them are the ports.
//
// Per plane, PE (r, c) is element r*COLS + c. A PE starts an invasion by
// sending an INV command on its command link and later receives ACK (with
// the number of PEs claimed) or REJ on its response link; RET on the command
// link releases the region again. See ic_array and the controllers for the
// link protocol and timing.
module invasion_mppa
  import inv_pkg::*;
#(
  parameter int unsigned ROWS = 5,
  parameter int unsigned COLS = 5,
  localparam int unsigned IW = $bits(inv_prog_pkg::ctrl_t) + $bits(inv_prog_pkg::slot_t)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // linear-invasion plane
  input  logic     [ROWS*COLS-1:0]  lin_cmd_valid,
  input  inv_msg_t                  lin_cmd       [ROWS*COLS],
  output logic     [ROWS*COLS-1:0]  lin_cmd_ready,
  output logic     [ROWS*COLS-1:0]  lin_rsp_valid,
  output inv_msg_t                  lin_rsp       [ROWS*COLS],
  input  logic     [ROWS*COLS-1:0]  lin_rsp_ready,
  input  logic     [ROWS*COLS-1:0]  lin_pe_busy,
  output logic     [ROWS*COLS-1:0]  lin_invaded,
  output logic     [ROWS*COLS-1:0]  lin_stall,
  // rectangular-invasion plane
  input  logic     [ROWS*COLS-1:0]  rect_cmd_valid,
  input  inv_msg_t                  rect_cmd      [ROWS*COLS],
  output logic     [ROWS*COLS-1:0]  rect_cmd_ready,
  output logic     [ROWS*COLS-1:0]  rect_rsp_valid,
  output inv_msg_t                  rect_rsp      [ROWS*COLS],
  input  logic     [ROWS*COLS-1:0]  rect_rsp_ready,
  input  logic     [ROWS*COLS-1:0]  rect_pe_busy,
  output logic     [ROWS*COLS-1:0]  rect_invaded,
  output logic     [ROWS*COLS-1:0]  rect_stall,
  input  logic     [ROWS*COLS-1:0]  prog_cmd_valid,
  input  inv_msg_t                  prog_cmd      [ROWS*COLS],
  output logic     [ROWS*COLS-1:0]  prog_cmd_ready,
  output logic     [ROWS*COLS-1:0]  prog_rsp_valid,
  output inv_msg_t                  prog_rsp      [ROWS*COLS],
  input  logic     [ROWS*COLS-1:0]  prog_rsp_ready,
  input  logic     [ROWS*COLS-1:0]  prog_pe_busy,
  output logic     [ROWS*COLS-1:0]  prog_invaded,
  output logic     [ROWS*COLS-1:0]  prog_stall,
  input  logic                      prog_imem_we,
  input  logic     [5:0]            prog_imem_addr,
  input  logic     [IW-1:0]         prog_imem_wdata,
  input  logic                      prog_run
);

  ic_array #(.ROWS(ROWS), .COLS(COLS), .RECT(1'b0)) u_lin (
    .clk, .rst_n,
    .pe_cmd_valid(lin_cmd_valid), .pe_cmd(lin_cmd), .pe_cmd_ready(lin_cmd_ready),
    .pe_rsp_valid(lin_rsp_valid), .pe_rsp(lin_rsp), .pe_rsp_ready(lin_rsp_ready),
    .pe_busy(lin_pe_busy), .invaded(lin_invaded), .stall(lin_stall),
    .imem_we(1'b0), .imem_addr(6'd0), .imem_wdata('0), .run(1'b0)
  );

  ic_array #(.ROWS(ROWS), .COLS(COLS), .RECT(1'b1)) u_rect (
    .clk, .rst_n,
    .pe_cmd_valid(rect_cmd_valid), .pe_cmd(rect_cmd), .pe_cmd_ready(rect_cmd_ready),
    .pe_rsp_valid(rect_rsp_valid), .pe_rsp(rect_rsp), .pe_rsp_ready(rect_rsp_ready),
    .pe_busy(rect_pe_busy), .invaded(rect_invaded), .stall(rect_stall),
    .imem_we(1'b0), .imem_addr(6'd0), .imem_wdata('0), .run(1'b0)
  );

  ic_array #(.ROWS(ROWS), .COLS(COLS), .PROG(1'b1)) u_prog (
    .clk, .rst_n,
    .pe_cmd_valid(prog_cmd_valid), .pe_cmd(prog_cmd), .pe_cmd_ready(prog_cmd_ready),
    .pe_rsp_valid(prog_rsp_valid), .pe_rsp(prog_rsp), .pe_rsp_ready(prog_rsp_ready),
    .pe_busy(prog_pe_busy), .invaded(prog_invaded), .stall(prog_stall),
    .imem_we(prog_imem_we), .imem_addr(prog_imem_addr), .imem_wdata(prog_imem_wdata),
    .run(prog_run)
  );

endmodule
