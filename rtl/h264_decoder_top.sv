// Decoding pipeline of a hardware H.264 decoder, as far as it is built here.
//
// The byte stream enters the NAL unit detector, whose re-aligned NAL unit
// words pass through a FIFO to the syntax parser. The parser decodes syntax
// elements under a microprogram and keeps them in its parameter registers;
// each element is also brought out (elem_*) for the next stage of the
// pipeline. Residual samples enter the transform unit (res_*): a luma array,
// or a pair of chroma arrays when res_chroma is set with the first sample. The
// results go through the reconstruction adder, together with an intra or inter
// prediction sample, to the reconstructed-sample output (recon_*), which feeds
// the current-frame memory.
//
// Pipeline modules exchange data over dedicated FIFO-buffered connections and
// are only initialised and supervised over the system bus (sys_*), a simple
// synchronous register interface for the host processor:
//   word address 0x00-0x1F  write: parser microprogram (uinstr_t in bits 12:0)
//   0x20                    write: bit 0 starts the parser on the next NAL unit
//   0x21                    read/write: transform mode (tmode_e in bits 1:0)
//   0x22                    read: status {27'b0, nalu_overrun, parser_error,
//                                  parser_busy, transform_busy, nalu_busy}
//   0x23                    read: number of start codes found
//   0x40-0x5F               read: parser parameter registers
// Reads are combinational (sys_rdata follows sys_addr).
//
// Flow control: in_ready is low while the NAL unit detector flushes the end
// of the stream or while the FIFO has fewer than three free places, which
// covers the word the detector may still be emitting. The detector's flush
// pauses the same way.
//
// The host processor, USB controller, main memory, VLC (residual) decoder,
// dequantiser, intra and inter predictors, frame memories, deblocking filter
// and display interface of the full decoder are outside this module; the
// ports named above are where they connect. The register map, the flow-control
// margins and the FIFO depth are this design's own choices.
module h264_decoder_top
  import h264_pkg::*;
#(
  parameter int FIFO_DEPTH = 16,
  parameter int DW         = 16,   // transform word length
  parameter int N          = 16,   // transform array side
  parameter bit PARALLEL   = 1'b0  // transform variant
) (
  input  logic          clk,
  input  logic          rst_n,
  // input bitstream
  input  logic          in_valid,
  input  logic [31:0]   in_data,
  input  logic          in_last,
  output logic          in_ready,
  output logic          next_nalu,
  // system bus (host processor)
  input  logic          sys_we,
  input  logic [7:0]    sys_addr,
  input  logic [31:0]   sys_wdata,
  output logic [31:0]   sys_rdata,
  // decoded syntax elements
  output logic          elem_valid,
  output logic [15:0]   elem_value,
  output logic [4:0]    elem_dest,
  output logic          elem_intra,
  output logic          elem_inter,
  // residual input (from the VLC decoder / dequantiser)
  input  logic          res_valid,
  input  logic [DW-1:0] res_data,
  input  logic          res_chroma,   // with the first sample: a chroma pair follows
  output logic          res_ready,
  // predictions and reconstructed samples
  input  logic          sel_inter,
  input  logic [7:0]    pred_intra,
  input  logic [7:0]    pred_inter,
  output logic          recon_valid,
  output logic [7:0]    recon_sample,
  output logic          recon_clipped,
  output logic          recon_last
);
  localparam int CW = $clog2(FIFO_DEPTH + 1);

  // ---- NAL unit detector -> FIFO -> syntax parser ----
  logic        nalu_busy, nalu_out_valid, nalu_first, nalu_last, nalu_overrun;
  logic [31:0] nalu_data;
  logic [2:0]  nalu_bytes;
  logic        fifo_full, fifo_empty, fifo_pop;
  logic [33:0] fifo_rd;
  logic [CW-1:0] fifo_count;
  logic        room;

  assign room     = (fifo_count <= CW'(FIFO_DEPTH - 3));
  assign in_ready = !nalu_busy && room;

  nalu_detector u_nalu (
    .clk, .rst_n,
    .data_en   (in_valid && in_ready),
    .data      (in_data),
    .data_last (in_last),
    .drain_hold(!room),
    .busy      (nalu_busy),
    .next_nalu (next_nalu),
    .out_valid (nalu_out_valid),
    .out_data  (nalu_data),
    .out_bytes (nalu_bytes),
    .out_first (nalu_first),
    .out_last  (nalu_last),
    .overrun   (nalu_overrun)
  );

  sync_fifo #(.W(34), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en  (nalu_out_valid),
    .wr_data({nalu_first, nalu_last, nalu_data}),
    .rd_en  (fifo_pop),
    .rd_data(fifo_rd),
    .full   (fifo_full),
    .empty  (fifo_empty),
    .count  (fifo_count)
  );

  logic        mp_we, p_start, p_busy, p_error;
  logic [15:0] preg_rdata;

  assign mp_we   = sys_we && sys_addr[7:5] == 3'b000;
  assign p_start = sys_we && sys_addr == 8'h20 && sys_wdata[0];

  syntax_parser u_parser (
    .clk, .rst_n,
    .fifo_ready  (!fifo_empty),
    .fifo_data   (fifo_rd[31:0]),
    .fifo_first  (fifo_rd[33]),
    .fifo_last   (fifo_rd[32]),
    .fifo_request(fifo_pop),
    .mp_we       (mp_we),
    .mp_addr     (sys_addr[4:0]),
    .mp_wdata    (sys_wdata[UINSTR_W-1:0]),
    .start       (p_start),
    .busy        (p_busy),
    .error       (p_error),
    .elem_valid  (elem_valid),
    .elem_value  (elem_value),
    .elem_dest   (elem_dest),
    .intra       (elem_intra),
    .inter       (elem_inter),
    .preg_addr   (sys_addr[4:0]),
    .preg_rdata  (preg_rdata)
  );

  // ---- transform unit -> reconstruction adder ----
  tmode_e      tmode;
  logic        t_busy, t_out_valid, t_out_last;
  logic [DW-1:0] t_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tmode <= TMODE_INV;
    else if (sys_we && sys_addr == 8'h21) tmode <= tmode_e'(sys_wdata[1:0]);
  end

  transform_unit #(.DW(DW), .N(N), .PARALLEL(PARALLEL)) u_transform (
    .clk, .rst_n,
    .data_en  (res_valid && res_ready),
    .data_in  (res_data),
    .mode     (tmode),
    .chroma   (res_chroma),
    .in_ready (res_ready),
    .busy     (t_busy),
    .out_valid(t_out_valid),
    .out_data (t_out),
    .out_last (t_out_last)
  );

  recon_adder #(.BITDEPTH(8), .RW(DW)) u_recon (
    .clk, .rst_n,
    .res_valid  (t_out_valid),
    .res_data   (t_out),
    .sel_inter  (sel_inter),
    .pred_intra (pred_intra),
    .pred_inter (pred_inter),
    .out_valid  (recon_valid),
    .out_sample (recon_sample),
    .out_clipped(recon_clipped)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) recon_last <= 1'b0;
    else        recon_last <= t_out_valid && t_out_last;
  end

  // ---- system bus: status and counters ----
  logic [31:0] nalu_count;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) nalu_count <= '0;
    else if (next_nalu) nalu_count <= nalu_count + 1'b1;
  end

  always_comb begin
    sys_rdata = '0;
    if (sys_addr[7:5] == 3'b010) sys_rdata = {16'd0, preg_rdata};
    else begin
      unique case (sys_addr)
        8'h21:   sys_rdata = {30'd0, tmode};
        8'h22:   sys_rdata = {27'd0, nalu_overrun, p_error, p_busy, t_busy, nalu_busy};
        8'h23:   sys_rdata = nalu_count;
        default: sys_rdata = '0;
      endcase
    end
  end

  // The FIFO is never written when full: the flow control above leaves room.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(nalu_out_valid && fifo_full)) else $error("NAL unit FIFO overflow");
  end

endmodule
