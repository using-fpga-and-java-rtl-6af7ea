// Reconstruction adder: prediction plus residual.
//
// A multiplexer picks the intra or the inter prediction sample, the adder adds
// the residual from the inverse transform, and the sum is clipped to the
// sample range 0 .. 2^BITDEPTH-1 before it goes to the current-frame memory.
// One result per res_valid cycle, registered: out_valid follows res_valid by
// one clock.
//
// The multiplexer and adder appear in the decoder's architecture diagram; the
// clipping, the 8-bit default sample depth (the Baseline and Main profiles)
// and the one-cycle register are this design's own choices.
module recon_adder #(
  parameter int BITDEPTH = 8,
  parameter int RW       = 16    // residual width (signed)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                res_valid,
  input  logic [RW-1:0]       res_data,
  input  logic                sel_inter,
  input  logic [BITDEPTH-1:0] pred_intra,
  input  logic [BITDEPTH-1:0] pred_inter,
  output logic                out_valid,
  output logic [BITDEPTH-1:0] out_sample,
  output logic                out_clipped
);
  localparam logic signed [RW+1:0] MAXV = (RW+2)'((1 << BITDEPTH) - 1);

  logic [BITDEPTH-1:0] pred;
  logic signed [RW+1:0] sum;
  logic [BITDEPTH-1:0] clipped;
  logic                 was_clipped;

  assign pred = sel_inter ? pred_inter : pred_intra;
  assign sum  = $signed({2'b00, RW'(pred)}) + $signed({{2{res_data[RW-1]}}, res_data});

  always_comb begin
    was_clipped = 1'b1;
    if (sum < 0)              clipped = '0;
    else if (sum > MAXV)      clipped = '1;
    else begin
      clipped     = BITDEPTH'(sum);
      was_clipped = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_sample  <= '0;
      out_clipped <= 1'b0;
    end else begin
      out_valid <= res_valid;
      if (res_valid) begin
        out_sample  <= clipped;
        out_clipped <= was_clipped;
      end
    end
  end
endmodule
