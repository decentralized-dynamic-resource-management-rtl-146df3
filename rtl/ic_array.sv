// 2D mesh of invasion controllers, one per PE of a ROWS x COLS processor array.
//
// Every controller is linked to its North, East, South and West neighbour by
// a pair of valid/ready message links (one per direction) and an availability
// wire, and to its own PE by a fifth link pair (port 4). Links leaving the
// edge of the array are tied off: nothing arrives on them, and the missing
// neighbour reports itself as not available, so no controller ever sends
// off the array. PE (r, c) is element r*COLS + c of every per-PE port; r
// grows to the South and c to the East, as in the PE(r, c) naming of the
// invasion examples.
//
// RECT and PROG select the controller flavour: PROG = 1 builds the mesh from
// the programmable controller (inv_ctrl_prog, one FU, 64-line instruction
// memory), otherwise RECT = 0 builds it from the linear invasion controller
// (inv_ctrl_lin) and RECT = 1 from the rectangular one (inv_ctrl_rect). The
// program port (imem_we, imem_addr, imem_wdata, run) is broadcast to every
// programmable controller, so all of them run the same exploration program;
// the hard-wired flavours leave it unconnected. The hard-wired controllers'
// parent_dir/child_mask status outputs are left open here on purpose (they
// are for observing a single controller), which lint reports as empty pin
// connections. The 5 x 5 default is the array of the document's examples.
module ic_array
  import inv_pkg::*;
#(
  parameter int unsigned ROWS = 5,
  parameter int unsigned COLS = 5,
  parameter bit          RECT = 1'b0,
  parameter bit          PROG = 1'b0,
  localparam int unsigned IW = $bits(inv_prog_pkg::ctrl_t) + $bits(inv_prog_pkg::slot_t)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // command link from each PE to its controller
  input  logic     [ROWS*COLS-1:0]  pe_cmd_valid,
  input  inv_msg_t                  pe_cmd       [ROWS*COLS],
  output logic     [ROWS*COLS-1:0]  pe_cmd_ready,
  // response link from each controller to its PE
  output logic     [ROWS*COLS-1:0]  pe_rsp_valid,
  output inv_msg_t                  pe_rsp       [ROWS*COLS],
  input  logic     [ROWS*COLS-1:0]  pe_rsp_ready,
  // PE state
  input  logic     [ROWS*COLS-1:0]  pe_busy,
  output logic     [ROWS*COLS-1:0]  invaded,
  output logic     [ROWS*COLS-1:0]  stall,
  // program load, programmable flavour only
  input  logic                      imem_we,
  input  logic     [5:0]            imem_addr,
  input  logic     [IW-1:0]         imem_wdata,
  input  logic                      run
);

  localparam int unsigned NPE = ROWS * COLS;

  // Per-controller port bundles; index [pe][port].
  logic     [NPORT-1:0] iv  [NPE];
  logic     [NPORT-1:0] ir  [NPE];
  inv_msg_t             im  [NPE][NPORT];
  logic     [NPORT-1:0] ov  [NPE];
  logic     [NPORT-1:0] orr [NPE];
  inv_msg_t             om  [NPE][NPORT];
  logic     [NDIR-1:0]  av_in [NPE];
  logic                 av_out[NPE];

  // Index of the neighbour of PE (r, c) in direction d, or -1 off the array.
  function automatic int nbr(input int r, input int c, input int d);
    int rr, cc;
    rr = r; cc = c;
    case (d)
      0:       rr = r - 1;
      1:       cc = c + 1;
      2:       rr = r + 1;
      default: cc = c - 1;
    endcase
    if (rr < 0 || rr >= int'(ROWS) || cc < 0 || cc >= int'(COLS)) return -1;
    return rr * int'(COLS) + cc;
  endfunction

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int P = r * COLS + c;

      // neighbour wiring
      for (genvar d = 0; d < NDIR; d++) begin : g_dir
        localparam int Q  = nbr(r, c, d);
        localparam int DO = (d + 2) % 4;   // port of the neighbour facing us
        if (Q >= 0) begin : g_link
          assign iv[P][d]   = ov[Q][DO];
          assign im[P][d]   = om[Q][DO];
          assign orr[P][d]  = ir[Q][DO];
          assign av_in[P][d] = av_out[Q];
        end else begin : g_edge
          assign iv[P][d]   = 1'b0;
          assign im[P][d]   = '0;
          assign orr[P][d]  = 1'b1;
          assign av_in[P][d] = 1'b0;
        end
      end

      // local PE link
      assign iv[P][DIR_L]   = pe_cmd_valid[P];
      assign im[P][DIR_L]   = pe_cmd[P];
      assign pe_cmd_ready[P] = ir[P][DIR_L];
      assign pe_rsp_valid[P] = ov[P][DIR_L];
      assign pe_rsp[P]       = om[P][DIR_L];
      assign orr[P][DIR_L]   = pe_rsp_ready[P];

      if (PROG) begin : g_prog
        logic [5:0] pc_unused;
        inv_ctrl_prog #(.SEED(16'(16'hACE1 ^ (P * 16'h9E37)))) u_ctrl (
          .clk, .rst_n,
          .in_valid (iv[P]),  .in_msg (im[P]),  .in_ready (ir[P]),
          .out_valid(ov[P]),  .out_msg(om[P]),  .out_ready(orr[P]),
          .avail_in (av_in[P]), .avail_out(av_out[P]),
          .pe_busy  (pe_busy[P]),
          .invaded  (invaded[P]),
          .stall    (stall[P]),
          .imem_we, .imem_addr, .imem_wdata, .run,
          .pc       (pc_unused)
        );
      end else if (RECT) begin : g_rect
        inv_ctrl_rect u_ctrl (
          .clk, .rst_n,
          .in_valid (iv[P]),  .in_msg (im[P]),  .in_ready (ir[P]),
          .out_valid(ov[P]),  .out_msg(om[P]),  .out_ready(orr[P]),
          .avail_in (av_in[P]), .avail_out(av_out[P]),
          .pe_busy  (pe_busy[P]),
          .invaded  (invaded[P]),
          .parent_dir(), .child_mask(),
          .stall    (stall[P])
        );
      end else begin : g_lin
        inv_ctrl_lin #(.SEED(16'(16'hACE1 ^ (P * 16'h9E37)))) u_ctrl (
          .clk, .rst_n,
          .in_valid (iv[P]),  .in_msg (im[P]),  .in_ready (ir[P]),
          .out_valid(ov[P]),  .out_msg(om[P]),  .out_ready(orr[P]),
          .avail_in (av_in[P]), .avail_out(av_out[P]),
          .pe_busy  (pe_busy[P]),
          .invaded  (invaded[P]),
          .parent_dir(), .child_mask(),
          .stall    (stall[P])
        );
      end
    end
  end

endmodule
