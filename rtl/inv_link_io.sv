// Port front end shared by the invasion controllers.
//
// It terminates the five message links of a controller (four mesh
// neighbours and the local PE). Each input link has a one-entry slot; the
// link is ready whenever its slot is empty, so ready never depends on the
// controller's decision logic. Every cycle the lowest-numbered port with a
// message (held in its slot, or arriving on the link into an empty slot) is
// offered to the controller as sel_*. If the controller takes it, it is gone;
// every other arriving message is parked in its slot. A message offered
// straight from the link is therefore handled in the cycle it arrives, which
// gives a one-cycle hop from neighbour to neighbour.
//
// Each output link has one register. The controller may write port i when
// out_free[i] is high (register empty, or its message leaves this cycle);
// out_set[i] loads out_new[i], which is driven on the link from the next
// cycle on and held until the neighbour takes it.
//
// Slot size, arbitration order and the valid/ready link are this design's
// own choices; the document only says that neighbouring controllers exchange
// commands over short local links.
module inv_link_io
  import inv_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // links in
  input  logic     [NPORT-1:0] in_valid,
  input  inv_msg_t             in_msg   [NPORT],
  output logic     [NPORT-1:0] in_ready,
  // links out
  output logic     [NPORT-1:0] out_valid,
  output inv_msg_t             out_msg  [NPORT],
  input  logic     [NPORT-1:0] out_ready,
  // to / from the controller
  output logic                 sel_valid,
  output logic     [2:0]       sel_port,
  output inv_msg_t             sel_msg,
  input  logic                 sel_take,
  output logic     [NPORT-1:0] out_free,
  input  logic     [NPORT-1:0] out_set,
  input  inv_msg_t             out_new  [NPORT]
);

  logic     [NPORT-1:0] slot_v;
  inv_msg_t             slot_m [NPORT];
  logic     [NPORT-1:0] pend;

  assign in_ready = ~slot_v;
  assign pend     = slot_v | in_valid;

  always_comb begin
    sel_valid = 1'b0;
    sel_port  = 3'd0;
    sel_msg   = '0;
    for (int i = NPORT - 1; i >= 0; i--) begin
      if (pend[i]) begin
        sel_valid = 1'b1;
        sel_port  = 3'(i);
        sel_msg   = slot_v[i] ? slot_m[i] : in_msg[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_v <= '0;
      for (int i = 0; i < NPORT; i++) slot_m[i] <= '0;
    end else begin
      for (int i = 0; i < NPORT; i++) begin
        if (sel_valid && sel_take && sel_port == 3'(i)) begin
          slot_v[i] <= 1'b0;
        end else if (!slot_v[i] && in_valid[i]) begin
          slot_v[i] <= 1'b1;
          slot_m[i] <= in_msg[i];
        end
      end
    end
  end

  assign out_free = ~out_valid | out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      for (int i = 0; i < NPORT; i++) out_msg[i] <= '0;
    end else begin
      for (int i = 0; i < NPORT; i++) begin
        if (out_set[i] && out_free[i]) begin
          out_valid[i] <= 1'b1;
          out_msg[i]   <= out_new[i];
        end else if (out_ready[i]) begin
          out_valid[i] <= 1'b0;
        end
      end
    end
  end

  // A message on an output link stays put until it is taken.
  for (genvar i = 0; i < NPORT; i++) begin : g_chk
    a_hold : assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[i] && !out_ready[i] |=> out_valid[i] && $stable(out_msg[i]));
  end

endmodule
