// NAL unit detector: splits an H.264 Annex B byte stream into NAL units.
//
// The byte stream arrives as 32-bit words, first byte in bits 31:24, one word
// per cycle with data_en high. Two word registers (rg1 = older, rg0 = newer)
// and the word being presented form a 12-byte window. Each step the start-code
// detector looks for the prefix 00 00 01 whose final 01 byte lies in the
// incoming word, so that every stream position is examined exactly once. A
// zero byte in front of the prefix (the 4-byte form 00 00 00 01) is treated as
// part of the start code and is not passed on.
//
// The shifter takes four bytes of the window starting at a byte offset fixed
// for the whole unit, so that the first byte of every NAL unit (its header
// byte) is the most significant byte of an output word. Output words run
// about two input words behind the input. The last word of a unit may hold
// fewer than four bytes: out_bytes says how many, the rest are zero.
//
// Interface:
//   data_en/data/data_last  input words; data_last marks the last word of the stream
//   busy                    after data_last the unit flushes the bytes still in its
//                           registers on its own; no data_en is accepted while busy
//   drain_hold              pauses that flush while the receiver cannot take words
//   next_nalu               one-cycle pulse when a start code has been found
//   out_valid/out_data/out_bytes/out_first/out_last  the NAL unit contents
//   overrun                 sticky: a start code arrived while three units were still
//                           in flight; does not happen with units of 2 bytes or more
//
// The two word registers, start-code detector, shifter, output register and
// control unit are those of the published block diagram; the 12-byte window
// (one word of look-ahead, which decides whether a zero byte belongs to the
// next start code before it is emitted), the three-entry unit tracker, the flush
// at end of stream and the output byte count are this design's own choices.
// Emulation-prevention bytes (00 00 03) are passed on unchanged.
module nalu_detector (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        data_en,
  input  logic [31:0] data,
  input  logic        data_last,
  input  logic        drain_hold,
  output logic        busy,
  output logic        next_nalu,
  output logic        out_valid,
  output logic [31:0] out_data,
  output logic [2:0]  out_bytes,
  output logic        out_first,
  output logic        out_last,
  output logic        overrun
);

  // One NAL unit in flight; positions are byte indices into the 12-byte window.
  typedef struct packed {
    logic       valid;
    logic       started;   // first word already emitted
    logic       has_end;
    logic [5:0] s;         // first payload byte (signed)
    logic [5:0] z;         // one past the last payload byte (signed)
  } unit_t;

  logic [31:0] rg1, rg0;
  localparam int NSLOT = 3;   // units in flight: emitting, waiting, waiting
  unit_t       u [NSLOT];     // u[0] is the unit being emitted
  logic        draining;

  logic        step;
  logic [31:0] din;
  logic [95:0] win;

  assign step = (data_en && !draining) || (draining && !drain_hold);
  assign din  = draining ? 32'd0 : data;
  assign win  = {rg1, rg0, din};
  assign busy = draining;

  function automatic logic [7:0] wbyte(input logic [95:0] w, input int i);
    return w[95-8*i -: 8];
  endfunction

  // Start-code detector: 01 at position p in 8..11, zeros at p-1 and p-2.
  logic       det;
  logic [5:0] det_start, det_end;
  always_comb begin
    det       = 1'b0;
    det_start = '0;
    det_end   = '0;
    for (int p = 11; p >= 8; p--) begin
      if (wbyte(win, p) == 8'h01 && wbyte(win, p-1) == 8'h00 && wbyte(win, p-2) == 8'h00) begin
        det       = 1'b1;
        det_start = 6'(p + 1);
        det_end   = (wbyte(win, p-3) == 8'h00) ? 6'(p - 3) : 6'(p - 2);
      end
    end
  end

  // Next state of the unit tracker and the word to emit.
  unit_t       nu [NSLOT];
  logic        emit, emit_last, emit_first, ovr;
  logic [2:0]  emit_n;
  logic [31:0] emit_word;
  logic        eos;
  logic        placed;

  assign eos = data_en && data_last && !draining;

  always_comb begin
    nu = u;
    ovr = 1'b0;
    emit = 1'b0;
    emit_last = 1'b0;
    emit_first = 1'b0;
    emit_n = 3'd4;
    emit_word = '0;
    placed = 1'b0;
    // A start code closes the open unit and opens the next slot.
    if (det) begin
      for (int i = 0; i < NSLOT; i++) begin
        if (!placed && (!nu[i].valid || !nu[i].has_end)) begin
          placed = 1'b1;
          if (nu[i].valid) begin
            nu[i].has_end = 1'b1;
            nu[i].z       = det_end;
            if (i + 1 < NSLOT) nu[i+1] = '{valid: 1'b1, started: 1'b0, has_end: 1'b0, s: det_start, z: '0};
            else ovr = 1'b1;
          end else begin
            nu[i] = '{valid: 1'b1, started: 1'b0, has_end: 1'b0, s: det_start, z: '0};
          end
        end
      end
      if (!placed) ovr = 1'b1;
    end
    // End of stream closes the open unit after the last input byte.
    if (eos) begin
      for (int i = 0; i < NSLOT; i++) begin
        if (nu[i].valid && !nu[i].has_end) begin
          nu[i].has_end = 1'b1;
          nu[i].z       = 6'd12;
        end
      end
    end
    // Emission from the oldest unit once its first byte is in the lower window.
    if (nu[0].valid && $signed(nu[0].s) <= 3) begin
      if (nu[0].has_end && $signed(nu[0].z) <= $signed(nu[0].s)) begin
        for (int i = 0; i < NSLOT - 1; i++) nu[i] = nu[i+1];   // empty unit
        nu[NSLOT-1] = '0;
      end else begin
        emit       = 1'b1;
        emit_first = !nu[0].started;
        emit_word  = 32'(win << (8 * nu[0].s[1:0]) >> 64);
        if (nu[0].has_end && $signed(nu[0].z) - $signed(nu[0].s) <= 4) begin
          emit_last = 1'b1;
          emit_n    = 3'(nu[0].z - nu[0].s);
          emit_word = emit_word & ~(32'hFFFF_FFFF >> (8 * emit_n));
          for (int i = 0; i < NSLOT - 1; i++) nu[i] = nu[i+1];
          nu[NSLOT-1] = '0;
        end else begin
          nu[0].started = 1'b1;
          nu[0].s       = nu[0].s + 6'd4;   // cursor moves on with the window
        end
      end
    end
    // The window moves by one word.
    for (int i = 0; i < NSLOT; i++) begin
      if (nu[i].valid) begin
        nu[i].s = nu[i].s - 6'd4;
        nu[i].z = nu[i].z - 6'd4;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rg1       <= '1;   // all-ones so that reset contents never look like a start code
      rg0       <= '1;
      for (int i = 0; i < NSLOT; i++) u[i] <= '0;
      draining  <= 1'b0;
      next_nalu <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_bytes <= '0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      next_nalu <= step && det;
      out_valid <= step && emit;
      if (step) begin
        rg1 <= rg0;
        rg0 <= din;
        u   <= nu;
        if (ovr) overrun <= 1'b1;
        if (emit) begin
          out_data  <= emit_word;
          out_bytes <= emit_n;
          out_first <= emit_first;
          out_last  <= emit_last;
        end
        if (eos) draining <= 1'b1;
        else if (draining && !nu[0].valid) draining <= 1'b0;
      end
    end
  end

endmodule
