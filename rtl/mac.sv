// mac: the multiply/shift unit of FU1 and FU2.
//   MUL/MULI  low 32 bits of a 32x32 product
//   MULH      high 32 bits, signed x signed; MULHU unsigned x unsigned
//   DMAC      dual multiply-add: two signed 32x16 products
//             a * c[15:0] and b * c[31:16], one 48-bit addition and an
//             arithmetic right shift by sh (0..15); the low 32 bits of the
//             shifted sum are the result
//   BSH/BSHI  bi-directional shift of a by the signed amount b:
//             b >= 0: saturating left shift (clamped to the signed 32-bit
//             range); b < 0: rounding right shift by -b (adds half an LSB
//             before an arithmetic shift). Amounts beyond +-31 are clamped.
// The document gives DMAC as "two 32x16-bit multiplications, one 48-bit
// addition and one right shift" and BSH as right-rounding or saturating-left
// depending on the sign of the amount. Which operands feed the products, the
// 4-bit shift field, the sign convention (positive = left) and the clamping
// are this design's choices. Combinational, single cycle.
module mac
  import slimsrp_pkg::*;
(
  input  opcode_e    op,
  input  word_t      a,
  input  word_t      b,
  input  word_t      c,
  input  logic [3:0] sh,
  output word_t      y
);
  logic signed [63:0] p_ss;
  logic        [63:0] p_uu;
  logic signed [47:0] d0, d1, dsum, dsh;
  word_t              bsh_y;

  assign p_ss = $signed(a) * $signed(b);
  assign p_uu = a * b;
  assign d0   = $signed(a) * $signed(c[15:0]);
  assign d1   = $signed(b) * $signed(c[31:16]);
  assign dsum = d0 + d1;
  assign dsh  = dsum >>> sh;

  always_comb begin
    logic signed [31:0] amt;
    logic signed [63:0] wide;
    logic [4:0]         n;
    amt   = $signed(b);
    bsh_y = a;
    if (amt >= 0) begin
      n    = (amt > 31) ? 5'd31 : amt[4:0];
      wide = $signed({{32{a[31]}}, a}) <<< n;
      if (wide > 64'sh7fff_ffff)       bsh_y = 32'h7fff_ffff;
      else if (wide < -64'sh8000_0000) bsh_y = 32'h8000_0000;
      else                             bsh_y = wide[31:0];
    end else begin
      n    = (amt < -31) ? 5'd31 : 5'(-amt);
      wide = $signed({{32{a[31]}}, a});
      wide = (wide + ((64'sd1 <<< n) >>> 1)) >>> n;
      bsh_y = wide[31:0];
    end
  end

  always_comb begin
    unique case (op)
      OP_MUL, OP_MULI: y = p_ss[31:0];
      OP_MULH:         y = p_ss[63:32];
      OP_MULHU:        y = p_uu[63:32];
      OP_DMAC:         y = dsh[31:0];
      OP_BSH, OP_BSHI: y = bsh_y;
      default:         y = '0;
    endcase
  end
endmodule
