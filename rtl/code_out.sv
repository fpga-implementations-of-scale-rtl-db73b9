// code_out: converts a model variable into the 8-bit output code.
//
// The board presents each model's signal as an 8-bit code (for a DAC or a
// logic analyser). This block maps a fixed-point value x linearly onto
// 0..255: code = clip((x - OFFSET) >> SHIFT, 0, 255), and registers it.
// `clipped` flags a value outside the window in the same cycle as the code.
//
// Interface: clk, rst_n (active low, asynchronous; code 0), x, code,
// clipped. One cycle of latency.
// The 8-bit width is the document's; the offset/shift mapping and the
// per-model windows are this design's choice.
module code_out
  import sinn_pkg::*;
#(
  parameter fx_t OFFSET = fx_const(0.0),
  parameter int  SHIFT  = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  fx_t        x,
  output logic [7:0] code,
  output logic       clipped
);

  logic signed [63:0] scaled;

  always_comb scaled = (64'(x) - 64'(OFFSET)) >>> SHIFT;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      code    <= '0;
      clipped <= 1'b0;
    end else if (scaled < 0) begin
      code    <= 8'd0;
      clipped <= 1'b1;
    end else if (scaled > 255) begin
      code    <= 8'd255;
      clipped <= 1'b1;
    end else begin
      code    <= scaled[7:0];
      clipped <= 1'b0;
    end

endmodule
