// Residual transform unit: 4x4 two-dimensional integer transforms of the
// 4x4 blocks held in a 16x16 sample array.
//
// The unit loads N*N luma samples (raster order, one per data_en cycle) into
// its data memory, then transforms the (N/4)^2 blocks one after another. As
// the one pipeline is switched between luminance and chrominance, it can
// instead load a chroma pair: chroma high with the first sample selects two
// (N/2)x(N/2) components, Cb then Cr, each in raster order, stored side by
// side in the upper half of the memory; then half as many blocks are
// transformed, the Cb blocks first. Each
// block takes two passes, both computed as inner products of 4-element vectors
// with rows of a coefficient matrix M:
//   pass 1 (rows):    T[r][c] = sum_j M[c][j] * X[r][j]  -> temporary memory
//   pass 2 (columns): Y[r][c] = sum_j M[r][j] * T[j][c]  -> output register
// All coefficients are +-1, +-2 or +-1/2, so each product is the operand
// itself, the operand shifted left by one bit, or shifted arithmetically right
// by one bit, and the adder/subtractor accumulates it into a register: no
// multiplier is needed.
//
//   TMODE_FWD  forward core transform, M = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1]
//   TMODE_INV  inverse core transform, M = [1 1 1 1/2; 1 1/2 -1 -1; 1 -1/2 -1 1; 1 -1 1 -1/2],
//              output (Y + 32) >>> 6; bit-exact with the standard's butterfly,
//              since each halving is applied to a single operand
//   TMODE_HAD  4x4 Hadamard, M = [1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1], raw output
//
// Single-stage variant (PARALLEL = 0): one product per cycle, so 4 cycles per
// output value, 128 cycles per block, 2048 cycles for a 16x16 luma array and
// 1024 for a chroma pair.
// Parallel variant (PARALLEL = 1): the four products of an inner product are
// formed by replicated shifters and summed in one cycle, 32 cycles per block.
//
// Interface: mode is sampled when the last sample is loaded; in_ready is high
// while samples are accepted; out_valid/out_data deliver the results block by
// block (blocks in raster order, values in raster order inside a block);
// out_last marks the final value. All arithmetic wraps at DW bits.
//
// The data and temporary 16x16 memories, the state/address counter, the
// memory multiplexer, the shift-by-one stage with its bypass, the
// adder/subtractor with its accumulator register and the output register
// follow the published block diagram and its 16-bit word length. The
// right-shift option (for the inverse transform's halves), the mode set, the
// chroma layout and the output rounding of the inverse are this design's own
// choices.
module transform_unit
  import h264_pkg::*;
#(
  parameter int DW       = 16,   // word length
  parameter int N        = 16,   // side of the sample array
  parameter bit PARALLEL = 1'b0  // 0: one product per cycle, 1: four
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          data_en,
  input  logic [DW-1:0] data_in,
  input  tmode_e        mode,
  input  logic          chroma,
  output logic          in_ready,
  output logic          busy,
  output logic          out_valid,
  output logic [DW-1:0] out_data,
  output logic          out_last
);
  localparam int NB  = N / 4;            // blocks per side
  localparam int AW  = $clog2(N * N);
  localparam int CW  = $clog2(N);
  localparam int BW  = (NB * NB > 1) ? $clog2(NB * NB) : 1;

  // Coefficient: sign, scale (0: x1, 1: x2, 2: x1/2).
  typedef struct packed {
    logic       neg;
    logic [1:0] scale;
  } coef_t;

  function automatic coef_t coef(input tmode_e m, input logic [1:0] i, input logic [1:0] j);
    coef_t c;
    c = '{neg: 1'b0, scale: 2'd0};
    unique case (m)
      TMODE_FWD: begin
        // rows: [1 1 1 1] [2 1 -1 -2] [1 -1 -1 1] [1 -2 2 -1]
        unique case (i)
          2'd0: c.neg = 1'b0;
          2'd1: begin c.neg = j[1]; c.scale = (j == 2'd0 || j == 2'd3) ? 2'd1 : 2'd0; end
          2'd2: c.neg = (j == 2'd1 || j == 2'd2);
          2'd3: begin c.neg = (j == 2'd1 || j == 2'd3); c.scale = (j == 2'd1 || j == 2'd2) ? 2'd1 : 2'd0; end
        endcase
      end
      TMODE_INV: begin
        // rows: [1 1 1 1/2] [1 1/2 -1 -1] [1 -1/2 -1 1] [1 -1 1 -1/2]
        unique case (i)
          2'd0: c.scale = (j == 2'd3) ? 2'd2 : 2'd0;
          2'd1: begin c.neg = j[1]; c.scale = (j == 2'd1) ? 2'd2 : 2'd0; end
          2'd2: begin c.neg = (j == 2'd1 || j == 2'd2); c.scale = (j == 2'd1) ? 2'd2 : 2'd0; end
          2'd3: begin c.neg = (j == 2'd1 || j == 2'd3); c.scale = (j == 2'd3) ? 2'd2 : 2'd0; end
        endcase
      end
      default: begin
        // Hadamard rows: [1 1 1 1] [1 1 -1 -1] [1 -1 -1 1] [1 -1 1 -1]
        unique case (i)
          2'd0: c.neg = 1'b0;
          2'd1: c.neg = j[1];
          2'd2: c.neg = (j == 2'd1 || j == 2'd2);
          2'd3: c.neg = (j == 2'd1 || j == 2'd3);
        endcase
      end
    endcase
    return c;
  endfunction

  // Shift stage: x1, x2 (left shift by one) or x1/2 (arithmetic right shift by one).
  function automatic logic [DW-1:0] scale_op(input logic [DW-1:0] x, input coef_t c);
    unique case (c.scale)
      2'd1:    return x << 1;
      2'd2:    return DW'($signed(x) >>> 1);
      default: return x;
    endcase
  endfunction

  typedef enum logic [1:0] {S_LOAD, S_PASS1, S_PASS2} state_e;

  state_e        state;
  tmode_e        mode_q;
  logic [DW-1:0] dmem [N * N];
  logic [DW-1:0] tmem [N * N];
  logic [AW-1:0] ld_cnt;      // samples loaded so far
  logic [AW-1:0] ld_addr;
  logic          chroma_q;    // array holds two chroma components
  logic          chroma_ld;
  logic [BW-1:0] blk;
  logic [1:0]    r, c, j;
  logic [DW-1:0] acc;

  // Block origin.
  logic [CW-1:0] bx, by;
  localparam int HN  = N / 2;           // chroma component side
  localparam int HNB = NB / 2;          // chroma blocks per side
  // Cb blocks, then Cr blocks; Cb in columns 0..N/2-1, Cr beside it.
  assign bx = chroma_q ? CW'((int'(blk) / (HNB * HNB)) * HN + 4 * ((int'(blk) % (HNB * HNB)) % HNB))
                       : CW'(4 * (int'(blk) % NB));
  assign by = chroma_q ? CW'(4 * ((int'(blk) % (HNB * HNB)) / HNB))
                       : CW'(4 * (int'(blk) / NB));

  // Load address: raster order for luma; for chroma the Cb component (raster)
  // then the Cr component (raster), side by side in the upper half.
  assign chroma_ld = (ld_cnt == '0) ? chroma : chroma_q;
  always_comb begin
    if (chroma_ld)
      ld_addr = AW'(((int'(ld_cnt) % (HN * HN)) / HN) * N
                    + (int'(ld_cnt) / (HN * HN)) * HN + (int'(ld_cnt) % HN));
    else
      ld_addr = ld_cnt;
  end

  function automatic logic [AW-1:0] addr(input logic [CW-1:0] row, input logic [CW-1:0] col);
    return AW'(int'(row) * N + int'(col));
  endfunction

  // Operand j of the current inner product, and its coefficient.
  function automatic logic [DW-1:0] operand(input logic [1:0] jj);
    if (state == S_PASS1) return dmem[addr(by + CW'(r), bx + CW'(jj))];
    else                  return tmem[addr(by + CW'(jj), bx + CW'(c))];
  endfunction

  function automatic coef_t coef_of(input logic [1:0] jj);
    return (state == S_PASS1) ? coef(mode_q, c, jj) : coef(mode_q, r, jj);
  endfunction

  function automatic logic [DW-1:0] term(input logic [1:0] jj);
    coef_t cf;
    logic [DW-1:0] v;
    cf = coef_of(jj);
    v  = scale_op(operand(jj), cf);
    return cf.neg ? DW'(-v) : v;
  endfunction

  // Adder/subtractor: the full inner product when the last term is added.
  logic [DW-1:0] sum;
  logic          last_term;
  always_comb begin
    if (PARALLEL) begin
      sum = term(2'd0) + term(2'd1) + term(2'd2) + term(2'd3);
      last_term = 1'b1;
    end else begin
      sum = ((j == 2'd0) ? '0 : acc) + term(j);
      last_term = (j == 2'd3);
    end
  end

  logic [DW-1:0] rounded;
  assign rounded = (mode_q == TMODE_INV) ? DW'($signed(sum + DW'(32)) >>> 6) : sum;

  logic block_end;
  assign block_end = last_term && r == 2'd3 && c == 2'd3;

  assign in_ready = (state == S_LOAD);
  assign busy     = (state != S_LOAD);

  always_ff @(posedge clk) begin
    if (state == S_LOAD && data_en) dmem[ld_addr] <= data_in;
    if (state == S_PASS1 && last_term) tmem[addr(by + CW'(r), bx + CW'(c))] <= sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      mode_q    <= TMODE_FWD;
      ld_cnt    <= '0;
      chroma_q  <= 1'b0;
      blk       <= '0;
      r         <= '0;
      c         <= '0;
      j         <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        S_LOAD: begin
          if (data_en) begin
            ld_cnt   <= ld_cnt + 1'b1;
            chroma_q <= chroma_ld;
            if (ld_cnt == (chroma_ld ? AW'(N * N / 2 - 1) : AW'(N * N - 1))) begin
              ld_cnt  <= '0;
              mode_q  <= mode;
              state   <= S_PASS1;
              blk     <= '0;
              {r, c, j} <= '0;
            end
          end
        end
        default: begin
          acc <= sum;
          if (PARALLEL) j <= '0;
          else j <= j + 1'b1;
          if (last_term) begin
            {r, c} <= {r, c} + 1'b1;
            if (state == S_PASS2) begin
              out_valid <= 1'b1;
              out_data  <= rounded;
            end
            if (block_end) begin
              if (state == S_PASS1) begin
                state <= S_PASS2;
              end else begin
                state <= S_PASS1;
                blk   <= blk + 1'b1;
                if (blk == (chroma_q ? BW'(NB * NB / 2 - 1) : BW'(NB * NB - 1))) begin
                  state    <= S_LOAD;
                  out_last <= 1'b1;
                end
              end
            end
          end
        end
      endcase
    end
  end

endmodule
