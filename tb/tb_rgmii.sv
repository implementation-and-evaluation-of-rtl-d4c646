// Self-checking testbench for rgmii.
// Receive: frames of random length and content are sent as RGMII nibbles
// (preamble, SFD, data, FCS); the byte stream must equal the data with the
// FCS removed, with sof on the first and last on the final byte.  Transmit:
// the received bytes are fed straight back into the transmitter at line
// rate, and the nibbles on rgmii_txd must be the preamble, SFD, the same data
// and an FCS computed here, with no underrun; rgmii_txc must toggle every
// cycle and the inter-frame gap must be at least 12 byte times.
module tb_rgmii;
  logic clk = 0, rst_n = 0;
  logic [3:0] rxd = 0;
  logic rx_ctl = 0;
  logic [3:0] txd;
  logic tx_ctl, txc;
  logic rx_valid, rx_sof, rx_last, tx_busy, tx_underrun;
  logic [7:0] rx_data;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  rgmii dut (
    .clk(clk), .rst_n(rst_n), .rgmii_rxd(rxd), .rgmii_rx_ctl(rx_ctl),
    .rgmii_txd(txd), .rgmii_tx_ctl(tx_ctl), .rgmii_txc(txc),
    .rx_valid_o(rx_valid), .rx_data_o(rx_data), .rx_sof_o(rx_sof), .rx_last_o(rx_last),
    .tx_valid_i(rx_valid), .tx_data_i(rx_data), .tx_last_i(rx_last),
    .tx_busy_o(tx_busy), .tx_underrun_o(tx_underrun));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] fcs_of(input logic [7:0] f [], input int n);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    for (int i = 0; i < n; i++) begin
      c ^= {24'd0, f[i]};
      for (int b = 0; b < 8; b++) c = c[0] ? (c >> 1) ^ 32'hEDB8_8320 : (c >> 1);
    end
    return ~c;
  endfunction

  logic [7:0] frame [];
  int flen;

  task automatic send_frame();
    logic [31:0] fcs;
    fcs = fcs_of(frame, flen);
    for (int i = 0; i < 15; i++) begin @(negedge clk); rx_ctl = 1; rxd = 4'h5; end
    @(negedge clk); rxd = 4'hD;
    for (int i = 0; i < flen; i++) begin
      @(negedge clk); rxd = frame[i][3:0];
      @(negedge clk); rxd = frame[i][7:4];
    end
    for (int i = 0; i < 8; i++) begin @(negedge clk); rxd = fcs[4*i +: 4]; end
    @(negedge clk); rx_ctl = 0; rxd = 0;
    repeat (24) @(negedge clk);   // inter-frame gap
  endtask

  // receive-side monitor
  logic [7:0] got [$];
  int sof_count = 0, last_count = 0, sof_ok = 0;
  always @(posedge clk) if (rst_n && rx_valid) begin
    if (rx_sof) begin sof_count++; if (got.size() == 0) sof_ok++; end
    got.push_back(rx_data);
    if (rx_last) last_count++;
  end

  // transmit-side monitor: collects nibbles while tx_ctl is high
  logic [3:0] tx_nibs [$];
  int frames_out = 0, gap = 0, min_gap = 1000, underruns = 0;
  logic txc_q;
  int txc_bad = 0, ncyc = 0;
  always @(posedge clk) if (rst_n) begin
    if (tx_ctl) begin
      if (gap > 0 && frames_out > 0 && gap < min_gap) min_gap = gap;
      gap = 0;
      tx_nibs.push_back(txd);
    end else gap++;
    if (tx_underrun) underruns++;
    txc_q <= txc;
    ncyc++;
    if (ncyc > 2 && txc_q == txc) txc_bad++;
  end

  initial begin
    int nframes = 6;
    int lens [6] = '{60, 64, 61, 100, 200, 1514};
    logic [7:0] sent [$];
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    for (int k = 0; k < nframes; k++) begin
      flen = lens[k];
      frame = new[flen];
      for (int i = 0; i < flen; i++) frame[i] = 8'($urandom);
      got.delete();
      sof_count = 0; last_count = 0; sof_ok = 0;
      send_frame();
      repeat (40) @(negedge clk);
      check("rx byte count", got.size(), flen);
      for (int i = 0; i < flen && i < got.size(); i++)
        if (got[i] !== frame[i]) begin check("rx byte", got[i], frame[i]); break; end
      check("rx sof once at first byte", {sof_count[15:0], sof_ok[15:0]}, {16'd1, 16'd1});
      check("rx last once", last_count, 1);
      for (int i = 0; i < flen; i++) sent.push_back(frame[i]);
      // transmitted frame
      begin
        logic [31:0] fcs;
        int n;
        n = 16 + 2 * flen + 8;
        fcs = fcs_of(frame, flen);
        wait (tx_nibs.size() >= n);
        repeat (4) @(negedge clk);
        checks++;
        begin
          int bad = 0;
          for (int i = 0; i < 15; i++) if (tx_nibs[i] != 4'h5) bad++;
          if (tx_nibs[15] != 4'hD) bad++;
          for (int i = 0; i < flen; i++)
            if ({tx_nibs[17 + 2*i], tx_nibs[16 + 2*i]} != frame[i]) bad++;
          for (int i = 0; i < 8; i++)
            if (tx_nibs[16 + 2*flen + i] != fcs[4*i +: 4]) bad++;
          if (tx_nibs.size() != n) bad++;
          if (bad != 0) begin failures++; $display("FAIL tx frame %0d: %0d bad nibbles", k, bad); end
        end
        tx_nibs.delete();
        frames_out++;
      end
    end
    check("no underrun", underruns, 0);
    check("txc toggles every cycle", txc_bad, 0);
    checks++;
    if (min_gap < 24) begin failures++; $display("FAIL gap %0d", min_gap); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
