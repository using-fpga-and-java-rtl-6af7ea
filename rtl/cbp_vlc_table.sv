// VLC table of the syntax parser: maps the Exp-Golomb codeNum of a mapped
// me(v) element to coded_block_pattern.
//
// The mapping is Table 9-4 of the H.264 standard for chroma formats 4:2:0 and
// 4:2:2, with one column for intra-coded (Intra_4x4 / Intra_8x8) and one for
// inter-coded macroblocks. The table contents come from the standard; the
// parser's block diagram only shows a VLC table driven by the Intra and
// Inter signals of its control unit. Purely combinational: codeNum values
// above 47 raise valid low.
module cbp_vlc_table (
  input  logic [15:0] code_num,
  input  logic        inter,     // 0: intra column, 1: inter column
  output logic [5:0]  cbp,
  output logic        valid
);
  // Each entry packs {intra cbp, inter cbp}.
  function automatic logic [11:0] entry(input logic [5:0] k);
    case (k)
      6'd0:  return {6'd47, 6'd0};   6'd1:  return {6'd31, 6'd16};
      6'd2:  return {6'd15, 6'd1};   6'd3:  return {6'd0,  6'd2};
      6'd4:  return {6'd23, 6'd4};   6'd5:  return {6'd27, 6'd8};
      6'd6:  return {6'd29, 6'd32};  6'd7:  return {6'd30, 6'd3};
      6'd8:  return {6'd7,  6'd5};   6'd9:  return {6'd11, 6'd10};
      6'd10: return {6'd13, 6'd12};  6'd11: return {6'd14, 6'd15};
      6'd12: return {6'd39, 6'd47};  6'd13: return {6'd43, 6'd7};
      6'd14: return {6'd45, 6'd11};  6'd15: return {6'd46, 6'd13};
      6'd16: return {6'd16, 6'd14};  6'd17: return {6'd3,  6'd6};
      6'd18: return {6'd5,  6'd9};   6'd19: return {6'd10, 6'd31};
      6'd20: return {6'd12, 6'd35};  6'd21: return {6'd19, 6'd37};
      6'd22: return {6'd21, 6'd42};  6'd23: return {6'd26, 6'd44};
      6'd24: return {6'd28, 6'd33};  6'd25: return {6'd35, 6'd34};
      6'd26: return {6'd37, 6'd36};  6'd27: return {6'd42, 6'd40};
      6'd28: return {6'd44, 6'd39};  6'd29: return {6'd1,  6'd43};
      6'd30: return {6'd2,  6'd45};  6'd31: return {6'd4,  6'd46};
      6'd32: return {6'd8,  6'd17};  6'd33: return {6'd17, 6'd18};
      6'd34: return {6'd18, 6'd20};  6'd35: return {6'd20, 6'd24};
      6'd36: return {6'd24, 6'd19};  6'd37: return {6'd6,  6'd21};
      6'd38: return {6'd9,  6'd26};  6'd39: return {6'd22, 6'd28};
      6'd40: return {6'd25, 6'd23};  6'd41: return {6'd32, 6'd27};
      6'd42: return {6'd33, 6'd29};  6'd43: return {6'd34, 6'd30};
      6'd44: return {6'd36, 6'd22};  6'd45: return {6'd40, 6'd25};
      6'd46: return {6'd38, 6'd38};  6'd47: return {6'd41, 6'd41};
      default: return '0;
    endcase
  endfunction

  logic [11:0] e;
  assign valid = (code_num < 16'd48);
  assign e     = entry(code_num[5:0]);
  assign cbp   = inter ? e[5:0] : e[11:6];
endmodule
