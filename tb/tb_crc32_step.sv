// Self-checking testbench for crc32_step.
// Checks the standard CRC-32 check value of the string "123456789"
// (CBF43926), the residue left after a frame followed by its own FCS, and
// random byte sequences against a reference written in the opposite form:
// a non-reflected, most-significant-bit-first shift register fed with
// bit-reversed bytes, whose result is bit-reversed at the end.
module tb_crc32_step;
  import ecat_pkg::*;

  logic [31:0] poly, crc_in, crc_out;
  logic [7:0]  data;
  int checks = 0, failures = 0;

  crc32_step dut (.poly_i(poly), .data_i(data), .crc_i(crc_in), .crc_o(crc_out));

  function automatic logic [31:0] rev32(input logic [31:0] v);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = v[31-i];
    return r;
  endfunction

  // reference: normal-form register, data bit 0 first
  function automatic logic [31:0] ref_step(input logic [31:0] c_reflected, input logic [7:0] d);
    logic [31:0] c;
    c = rev32(c_reflected);
    for (int i = 0; i < 8; i++) begin
      if (c[31] ^ d[i]) c = (c << 1) ^ 32'h04C1_1DB7;
      else              c = c << 1;
    end
    return rev32(c);
  endfunction

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  task automatic step(input logic [7:0] d, inout logic [31:0] c);
    data   = d;
    crc_in = c;
    #1;
    c = crc_out;
  endtask

  initial begin
    logic [31:0] c, r;
    logic [7:0] frame [64];
    string s;
    poly = ETH_CRC_POLY;

    // check value of "123456789"
    s = "123456789";
    c = 32'hFFFF_FFFF;
    for (int i = 0; i < s.len(); i++) step(s[i], c);
    check("check value", ~c, 32'hCBF4_3926);

    // frame followed by its FCS leaves the fixed residue
    for (int i = 0; i < 60; i++) frame[i] = 8'($urandom);
    c = 32'hFFFF_FFFF;
    for (int i = 0; i < 60; i++) step(frame[i], c);
    r = ~c;
    for (int i = 0; i < 4; i++) step(r[8*i +: 8], c);
    check("residue", c, ETH_CRC_RESIDUE);

    // random single steps against the reference
    for (int n = 0; n < 500; n++) begin
      logic [31:0] cr;
      logic [7:0]  d;
      cr = $urandom;
      d  = 8'($urandom);
      data = d; crc_in = cr;
      #1;
      check("random step", crc_out, ref_step(cr, d));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
