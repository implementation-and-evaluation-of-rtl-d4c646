// Testbench helper: watches one RGMII transmit direction (one nibble per
// cycle of the 250 MHz clock, low nibble first) and collects whole frames.
// For each frame it checks the preamble and start-of-frame delimiter
// (seven 55 bytes and D5), recomputes the CRC-32 over the data and the four
// FCS bytes, which must leave the Ethernet residue, and stores the data
// bytes without preamble and FCS in the queue `frames`.  Counters: frames
// seen, bad preambles, bad FCS.
module rgmii_frame_monitor (
  input logic       clk,
  input logic [3:0] txd,
  input logic       tx_ctl
);
  logic [7:0] frames [$][$];
  int         count = 0, bad_preamble = 0, bad_fcs = 0;
  logic [3:0] nib [$];
  logic       was_on = 0;

  function automatic logic [31:0] crc_bytes(input logic [7:0] b [$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i])
      for (int k = 0; k < 8; k++)
        c = (c >> 1) ^ ((c[0] ^ b[i][k]) ? 32'hEDB8_8320 : 32'h0);
    return c;
  endfunction

  always @(posedge clk) begin
    if (tx_ctl) nib.push_back(txd);
    if (was_on && !tx_ctl) begin
      logic [7:0] b [$];
      logic [7:0] d [$];
      b.delete();
      d.delete();
      for (int i = 0; i + 1 < nib.size(); i += 2) b.push_back({nib[i+1], nib[i]});
      count++;
      for (int i = 0; i < 8; i++)
        if (i >= b.size() || b[i] != ((i == 7) ? 8'hD5 : 8'h55)) begin bad_preamble++; break; end
      for (int i = 8; i < b.size(); i++) d.push_back(b[i]);
      if (d.size() < 4 || crc_bytes(d) != 32'hDEBB_20E3) bad_fcs++;
      for (int i = 0; i < 4 && d.size() > 0; i++) void'(d.pop_back());
      frames.push_back(d);
      nib.delete();
    end
    was_on <= tx_ctl;
  end
endmodule
