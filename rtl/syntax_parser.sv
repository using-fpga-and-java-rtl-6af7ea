// Syntax parser: decodes the syntax elements of a NAL unit under microprogram control.
//
// The NAL unit contents arrive through a FIFO as 32-bit words, each tagged
// with the first and last word of its unit. Two word registers (rg1 older,
// rg0 newer) hold a 64-bit window; a 5-bit accumulator gives the bit position
// of the next unread bit in rg1. The left shifter brings that bit to the top
// of a 32-bit field. A prefix length detector counts the leading zeros k0 of
// the 16 high-order bits; for an Exp-Golomb element the code length is
// k = 2*k0+1, for a fixed-length element k comes from the microinstruction.
// The right shifter moves the k-bit code down by 32-k, and subtracting one
// gives codeNum, from which the ue(v), se(v), te(v) and me(v) values follow
// (me(v) through the coded_block_pattern VLC table). The selected value is
// written to the parameter register named by the microinstruction. Adding k
// to the accumulator gives the new bit position; its carry shifts rg0 into rg1
// and requests the next word from the FIFO.
//
// Control: the microprogram (one uinstr_t per word: descriptor, length or
// mode, destination register) is loaded through mp_we/mp_addr/mp_wdata. A
// start pulse makes the parser drop FIFO words up to the first word of the
// next NAL unit, fill both registers and run the microprogram from address 0
// until DESC_END. Past the unit's last word the window is filled with zeros.
//
// Timing: one syntax element per cycle while the window holds two words; an
// element whose bits cross into a new word costs no extra cycle as long as the
// FIFO is not empty. Values are 16 bits; Exp-Golomb codes may have up to 15
// leading zeros (codeNum up to 65534); a longer prefix, or an me(v) codeNum
// above 47, stops the run with error set.
//
// The registers, shifters, accumulator with carry, prefix detector, code-1
// stage, the se/te/me stages, the multiplexer and the parameter registers are
// those of the published block diagram. The microinstruction format, the
// DESC_ALIGN descriptor, the first/last word tags and the start/sync protocol
// are this design's own choices. Emulation-prevention bytes are not removed.
module syntax_parser
  import h264_pkg::*;
#(
  parameter int MP_DEPTH = 32,   // microprogram words
  parameter int NPARAM   = 32    // parameter registers (5-bit destination)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // FIFO: ready = not empty, request = read
  input  logic                        fifo_ready,
  input  logic [31:0]                 fifo_data,
  input  logic                        fifo_first,
  input  logic                        fifo_last,
  output logic                        fifo_request,
  // microprogram loading and control
  input  logic                        mp_we,
  input  logic [$clog2(MP_DEPTH)-1:0] mp_addr,
  input  logic [UINSTR_W-1:0]         mp_wdata,
  input  logic                        start,
  output logic                        busy,
  output logic                        error,
  // decoded elements
  output logic                        elem_valid,
  output logic [15:0]                 elem_value,
  output logic [4:0]                  elem_dest,
  output logic                        intra,
  output logic                        inter,
  // parameter register read port
  input  logic [4:0]                  preg_addr,
  output logic [15:0]                 preg_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_SYNC, S_RUN} state_e;

  state_e       state;
  uinstr_t      mp [MP_DEPTH];
  logic [$clog2(MP_DEPTH)-1:0] pc;
  logic [31:0]  rg1, rg0;
  logic [1:0]   nwords;      // valid words in the window: 0, 1 or 2
  logic [4:0]   acc;         // bit position in rg1
  logic         tail;        // last word of the unit already loaded
  logic [15:0]  preg [NPARAM];

  uinstr_t      ui;
  assign ui = mp[pc];

  // Word source: the FIFO, or zeros after the unit's last word.
  logic        can_load;
  logic [31:0] load_word;
  assign can_load  = tail || fifo_ready;
  assign load_word = tail ? 32'd0 : fifo_data;

  // ---- datapath ----
  logic [63:0] win;
  logic [31:0] top;
  logic [15:0] hi16;
  logic [4:0]  k0;           // prefix length
  logic        k0_ovf;       // 16 or more leading zeros
  logic [5:0]  k;
  logic [15:0] raw;         // k-bit code, at most 16 significant bits
  logic [15:0] code_num;
  logic [15:0] value;
  logic        bad;
  logic [5:0]  acc_sum;
  logic [5:0]  cbp;
  logic        cbp_ok;

  assign win  = {rg1, rg0};
  assign top  = 32'(win << acc >> 32);
  assign hi16 = top[31:16];

  always_comb begin
    k0     = 5'd16;
    for (int i = 0; i < 16; i++) begin
      if (hi16[i]) k0 = 5'(15 - i);
    end
    k0_ovf = (k0 == 5'd16);
  end

  always_comb begin
    unique case (ui.desc)
      DESC_U:     k = {1'b0, ui.n};
      DESC_TE:    k = (ui.n == 5'd1) ? 6'd1 : {k0, 1'b1};
      DESC_ALIGN: k = {3'd0, 3'(3'd0 - acc[2:0])};
      default:    k = {k0, 1'b1};
    endcase
  end

  assign raw      = (k == 6'd0) ? 16'd0 : 16'(top >> (6'd32 - k));
  assign code_num = raw - 16'd1;
  assign acc_sum  = {1'b0, acc} + k;

  cbp_vlc_table u_vlc (.code_num(code_num), .inter(ui.n[0]), .cbp(cbp), .valid(cbp_ok));

  always_comb begin
    bad = 1'b0;
    unique case (ui.desc)
      DESC_U:     value = raw;
      DESC_UE:    begin value = code_num; bad = k0_ovf; end
      DESC_SE:    begin
                    // codeNum 2m-1 -> +m, 2m -> -m
                    value = code_num[0] ? 16'((code_num >> 1) + 16'd1) : 16'(-(code_num >> 1));
                    bad   = k0_ovf;
                  end
      DESC_TE:    begin
                    value = (ui.n == 5'd1) ? {15'd0, ~raw[0]} : code_num;
                    bad   = (ui.n != 5'd1) && k0_ovf;
                  end
      DESC_ME:    begin value = {10'd0, cbp}; bad = k0_ovf || !cbp_ok; end
      default:    value = 16'd0;
    endcase
  end

  assign intra = (state == S_RUN) && (ui.desc == DESC_ME) && !ui.n[0];
  assign inter = (state == S_RUN) && (ui.desc == DESC_ME) &&  ui.n[0];

  // ---- control ----
  logic exec;    // an element is decoded this cycle
  assign exec = (state == S_RUN) && (nwords == 2'd2) && (ui.desc != DESC_END) && !bad;

  always_comb begin
    fifo_request = 1'b0;
    if (state == S_SYNC) begin
      if (nwords == 2'd0) fifo_request = fifo_ready;              // drop or take the first word
      else if (nwords == 2'd1) fifo_request = fifo_ready && !tail;
    end else if (state == S_RUN && !tail) begin
      if (nwords == 2'd1) fifo_request = fifo_ready;
      else if (exec && acc_sum[5]) fifo_request = fifo_ready;
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (mp_we) mp[mp_addr] <= uinstr_t'(mp_wdata);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pc         <= '0;
      rg1        <= '0;
      rg0        <= '0;
      nwords     <= '0;
      acc        <= '0;
      tail       <= 1'b0;
      error      <= 1'b0;
      elem_valid <= 1'b0;
      elem_value <= '0;
      elem_dest  <= '0;
      for (int i = 0; i < NPARAM; i++) preg[i] <= '0;
    end else begin
      elem_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state  <= S_SYNC;
            pc     <= '0;
            nwords <= '0;
            acc    <= '0;
            tail   <= 1'b0;
            error  <= 1'b0;
          end
        end
        S_SYNC: begin
          if (nwords == 2'd0) begin
            if (fifo_ready && fifo_first) begin
              rg1    <= fifo_data;
              nwords <= 2'd1;
              tail   <= fifo_last;
            end
          end else if (can_load) begin
            rg0    <= load_word;
            nwords <= 2'd2;
            if (!tail) tail <= fifo_last;
            state  <= S_RUN;
          end
        end
        S_RUN: begin
          if (ui.desc == DESC_END) begin
            state <= S_IDLE;
          end else if (nwords == 2'd2 && bad) begin
            error <= 1'b1;
            state <= S_IDLE;
          end else if (nwords == 2'd1) begin
            if (can_load) begin
              rg0    <= load_word;
              nwords <= 2'd2;
              if (!tail) tail <= fifo_last;
            end
          end else if (exec) begin
            if (ui.desc != DESC_ALIGN) begin
              preg[ui.dest] <= value;
              elem_valid    <= 1'b1;
              elem_value    <= value;
              elem_dest     <= ui.dest;
            end
            pc  <= pc + 1'b1;
            acc <= acc_sum[4:0];
            if (acc_sum[5]) begin
              rg1 <= rg0;
              if (can_load) begin
                rg0 <= load_word;
                if (!tail) tail <= fifo_last;
              end else begin
                nwords <= 2'd1;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign preg_rdata = preg[preg_addr];

endmodule
