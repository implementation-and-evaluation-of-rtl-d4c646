// One byte step of the Ethernet CRC-32, purely combinational.
//
// The register is shifted once per input bit; the bit shifted out is XORed
// with the next data bit and, when that feedback is one, the generator
// polynomial is XORed into the shifted register (a feedback bit ANDed with
// every polynomial bit).  The eight steps for one byte are unrolled, so a
// whole byte is absorbed in one clock cycle of the caller, which keeps pace
// with the RGMII byte stream.  The polynomial is an input so the block can
// be reused for other CRCs; for Ethernet it is 32'h04C11DB7.
//
// Bit order is the Ethernet one: data bits are taken least significant first
// and the register is kept in reflected form, so a caller starts with
// 32'hFFFF_FFFF, feeds every byte of the frame and sends ~crc_o least
// significant byte first as the FCS.  Using the reflected form is this
// design's choice; the shift/AND/XOR structure is the one described for the
// slave's CRC generator.
module crc32_step (
  input  logic [31:0] poly_i,  // generator polynomial, normal notation
  input  logic [7:0]  data_i,  // input byte
  input  logic [31:0] crc_i,   // last result
  output logic [31:0] crc_o    // result after absorbing data_i
);

  logic [31:0] poly_r;

  always_comb begin
    for (int i = 0; i < 32; i++) poly_r[i] = poly_i[31-i];
  end

  always_comb begin
    logic [31:0] c;
    logic fb;
    c = crc_i;
    for (int i = 0; i < 8; i++) begin
      fb = c[0] ^ data_i[i];
      c  = (c >> 1) ^ (poly_r & {32{fb}});
    end
    crc_o = c;
  end

endmodule
