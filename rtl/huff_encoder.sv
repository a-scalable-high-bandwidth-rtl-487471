// huff_encoder: static Huffman encoder for one window of selections per
// cycle. A LITERAL becomes its fixed literal code (8 or 9 bits); a MATCH
// becomes length code + length extra bits + distance code + distance extra
// bits (12 to 28 bits for lengths up to 34); COVERED and NONE positions
// produce nothing (size 0). Codes are LSB-first with zero bits above size.
//
// The code book is computed from the lz_pkg functions instead of being read
// from a ROM; a synthesis tool reduces it to the same lookup. Two stages:
// input register, then code lookup into the output register.
module huff_encoder
  import lz_pkg::*;
#(
  parameter int unsigned PWS = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_last,
  input  sel_t [PWS-1:0]      in_sel,
  output logic                out_valid,
  output logic                out_last,
  output code_t [PWS-1:0]     out_code
);

  logic           s1_valid, s1_last;
  sel_t [PWS-1:0] s1_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_valid  <= in_valid;
      out_valid <= s1_valid;
    end
  end

  always_ff @(posedge clk) begin
    s1_sel   <= in_sel;
    s1_last  <= in_last;
    out_last <= s1_last;
    for (int i = 0; i < PWS; i++) begin
      unique case (s1_sel[i].kind)
        SEL_LIT:   out_code[i] <= lit_code(s1_sel[i].lit);
        SEL_MATCH: out_code[i] <= match_code(s1_sel[i].len, s1_sel[i].off);
        default:   out_code[i] <= '0;
      endcase
      if (!s1_valid) out_code[i] <= '0;
    end
  end

endmodule
