// 16-bit Galois LFSR, polynomial x^16 + x^14 + x^13 + x^11 + 1 (maximal
// length). It steps every cycle and supplies the random choices of the
// random-walk linear invasion policy. The document asks for a random choice
// of neighbour but says nothing of how it is made; the LFSR and its seed
// parameter are this design's own choice. A zero seed is replaced by 1.
module inv_lfsr #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] value
);

  localparam logic [15:0] SEED_NZ = (SEED == 16'h0) ? 16'h0001 : SEED;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) value <= SEED_NZ;
    else        value <= {1'b0, value[15:1]} ^ (value[0] ? 16'hB400 : 16'h0000);
  end

endmodule
