// End-to-end testbench for ethercat_slave_top, with every parameter of the
// top at its default.
//
// Two nodes form a line: the master (this testbench) feeds node 1 port 0;
// node 1 port 1 is wired to node 2 port 0, and node 2 port 0 sends back into
// node 1 port 1.  Nothing is connected behind node 2, so its port-1 PHY
// reports no link.  Four behavioural PHYs answer the MDIO buses; the one of
// node 1 port 0 ignores its first three reads, as a PHY still in reset does.
// The management clock is 2.5 MHz, the frame clock 250 MHz.
//
// Sequence:
//   1. bring-up: all four controllers configure their PHYs (checked in the
//      PHY registers: page 2 register 21 bit 4 cleared, register 0 = 8140
//      hex, page 0 selected), node 1 sees a link on port 1, node 2 none, so
//      node 2 becomes the last node;
//   2. frames: the 60-byte bring-up frame (three datagrams), a broadcast
//      read of the register file, a non-EtherCAT frame, random EtherCAT
//      frames and one of the largest size (1514 bytes).  Each frame is sent
//      as RGMII nibbles with its FCS; the answer on node 1 port 0 must carry
//      a good FCS and equal a reference model of the two nodes byte for
//      byte (working counters of both nodes, MAC exchange at node 2);
//   3. link change: the PHY behind node 1 port 1 drops its link, node 1
//      becomes the last node and loops the next frame itself; the link then
//      returns;
//   4. the CGRA memory interface of node 1: master read and write, a
//      collision with PE 0 whose master write is deferred, concurrent reads
//      and the PE-1 address 0x00010104.
// Every mechanism is counted and must occur at least once.
module tb_ethercat_slave_top;
  logic clk_250 = 0, clk_mgmt = 0, clk_cgra = 0, rst_n = 0;
  always #2   clk_250  = ~clk_250;
  always #200 clk_mgmt = ~clk_mgmt;
  always #5   clk_cgra = ~clk_cgra;

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ----------------------------------------------------------- two nodes
  logic [3:0] rxd1 [2], rxd2 [2], txd1 [2], txd2 [2];
  logic       rxc1 [2], rxc2 [2], txc1 [2], txc2 [2], txk1 [2], txk2 [2];
  logic       mdc1 [2], mdc2 [2], mo1 [2], mo2 [2], moe1 [2], moe2 [2], mi1 [2], mi2 [2];
  logic       cd1 [2], cd2 [2], lu1 [2], lu2 [2], un1 [2], un2 [2];
  logic       last1, last2, ef1, ef2, ds1, ds2;

  // CGRA side of node 1 (node 2's stays idle)
  logic        e_en = 0, e_we = 0;
  logic [31:0] e_a = 0, e_d = 0, e_q1, e_q2;
  logic [2:0]  c_en = 0, c_we = 0;
  logic [23:0] c_a = 0;
  logic [95:0] c_d = 0, c_q1, c_q2;
  logic [2:0]  cf1, bf1, lo1, cf2, bf2, lo2;

  // wiring of the line
  assign rxd1[0] = m_rxd;  assign rxc1[0] = m_rx_ctl;
  assign rxd2[0] = txd1[1]; assign rxc2[0] = txc1[1];
  assign rxd1[1] = txd2[0]; assign rxc1[1] = txc2[0];
  assign rxd2[1] = 4'h0;    assign rxc2[1] = 1'b0;

  logic [3:0] m_rxd = 0;
  logic       m_rx_ctl = 0;

  ethercat_slave_top u_node1 (
    .clk_250(clk_250), .clk_mgmt(clk_mgmt), .clk_cgra(clk_cgra), .rst_n(rst_n),
    .rgmii_rxd(rxd1), .rgmii_rx_ctl(rxc1), .rgmii_txd(txd1), .rgmii_tx_ctl(txc1), .rgmii_txc(txk1),
    .mdc(mdc1), .mdio_o(mo1), .mdio_oe(moe1), .mdio_i(mi1),
    .config_done(cd1), .link_up(lu1), .is_last(last1), .ecat_frame(ef1), .dgram_served(ds1),
    .tx_underrun(un1),
    .ecat_enable_i(e_en), .ecat_we_i(e_we), .ecat_address_i(e_a), .ecat_data_i(e_d), .ecat_data_o(e_q1),
    .cgra_enable_i(c_en), .cgra_we_i(c_we), .cgra_address_i(c_a), .cgra_data_i(c_d), .cgra_data_o(c_q1),
    .cgra_conflict_o(cf1), .cgra_buffer_full_o(bf1), .cgra_lost_o(lo1));

  ethercat_slave_top u_node2 (
    .clk_250(clk_250), .clk_mgmt(clk_mgmt), .clk_cgra(clk_cgra), .rst_n(rst_n),
    .rgmii_rxd(rxd2), .rgmii_rx_ctl(rxc2), .rgmii_txd(txd2), .rgmii_tx_ctl(txc2), .rgmii_txc(txk2),
    .mdc(mdc2), .mdio_o(mo2), .mdio_oe(moe2), .mdio_i(mi2),
    .config_done(cd2), .link_up(lu2), .is_last(last2), .ecat_frame(ef2), .dgram_served(ds2),
    .tx_underrun(un2),
    .ecat_enable_i(1'b0), .ecat_we_i(1'b0), .ecat_address_i(32'h0), .ecat_data_i(32'h0), .ecat_data_o(e_q2),
    .cgra_enable_i(3'b0), .cgra_we_i(3'b0), .cgra_address_i(24'h0), .cgra_data_i(96'h0), .cgra_data_o(c_q2),
    .cgra_conflict_o(cf2), .cgra_buffer_full_o(bf2), .cgra_lost_o(lo2));

  // ------------------------------------------------------------ PHYs
  logic link_n1p1 = 1;
  logic line1 [2], line2 [2], poe1 [2], po1 [2], poe2 [2], po2 [2];
  for (genvar p = 0; p < 2; p++) begin : g_phy
    assign line1[p] = moe1[p] ? mo1[p] : (poe1[p] ? po1[p] : 1'b1);
    assign line2[p] = moe2[p] ? mo2[p] : (poe2[p] ? po2[p] : 1'b1);
    assign mi1[p] = line1[p];
    assign mi2[p] = line2[p];
  end
  phy_mdio_model u_phy1_0 (.mdc(mdc1[0]), .mdio_line(line1[0]), .phy_oe(poe1[0]), .phy_o(po1[0]), .link(1'b1));
  phy_mdio_model u_phy1_1 (.mdc(mdc1[1]), .mdio_line(line1[1]), .phy_oe(poe1[1]), .phy_o(po1[1]), .link(link_n1p1));
  phy_mdio_model u_phy2_0 (.mdc(mdc2[0]), .mdio_line(line2[0]), .phy_oe(poe2[0]), .phy_o(po2[0]), .link(1'b1));
  phy_mdio_model u_phy2_1 (.mdc(mdc2[1]), .mdio_line(line2[1]), .phy_oe(poe2[1]), .phy_o(po2[1]), .link(1'b0));

  // ------------------------------------------------------- monitors
  rgmii_frame_monitor u_mon_ret  (.clk(clk_250), .txd(txd1[0]), .tx_ctl(txc1[0]));  // back to master
  rgmii_frame_monitor u_mon_fwd  (.clk(clk_250), .txd(txd1[1]), .tx_ctl(txc1[1]));  // node 1 -> node 2
  rgmii_frame_monitor u_mon_loop (.clk(clk_250), .txd(txd2[0]), .tx_ctl(txc2[0]));  // node 2 looped
  rgmii_frame_monitor u_mon_end  (.clk(clk_250), .txd(txd2[1]), .tx_ctl(txc2[1]));  // must stay silent

  int served1 = 0, served2 = 0, underruns = 0;
  always @(posedge clk_250) begin
    if (rst_n) begin
      if (ds1) served1++;
      if (ds2) served2++;
      if (un1[0] || un1[1] || un2[0] || un2[1]) underruns++;
    end
  end

  // ------------------------------------------------------ mechanisms
  int n_mdio_retry = 0, n_config = 0, n_link_up = 0, n_link_down = 0, n_link_change = 0;
  int n_forward = 0, n_loopback = 0, n_return = 0, n_swap = 0, n_wkc = 0, n_passthrough = 0;
  int n_fcs_ok = 0, n_cgra_conflict = 0, n_cgra_deferred = 0, n_cgra_parallel = 0;

  // every read the PHY in reset ignored forced the controller to retry
  int nr_prev = 3;
  always @(posedge clk_mgmt) begin
    if (u_phy1_0.not_ready_reads < nr_prev) n_mdio_retry++;
    nr_prev = u_phy1_0.not_ready_reads;
  end

  // ------------------------------------------------- reference model
  logic [7:0] regs1 [32], regs2 [32];
  int served_model = 0;

  // one node: serve datagrams, add working counters, exchange MACs if last
  function automatic void node(input logic [7:0] fin [$], input bit last, input int node_id,
                               output logic [7:0] fout [$]);
    int n, p;
    fout = fin;
    n = fin.size();
    if (n >= 16 && fin[12] == 8'h88 && fin[13] == 8'hA4) begin
      p = 16;
      while (p + 10 <= n) begin
        int cmd, adp, ado, len, inc;
        bit rd, wr, hit;
        cmd = fin[p];
        adp = fin[p+2] | (fin[p+3] << 8);
        ado = fin[p+4] | (fin[p+5] << 8);
        len = (fin[p+6] | (fin[p+7] << 8)) & 16'h07FF;
        rd = 0; wr = 0; inc = 0; hit = 0;
        case (cmd)
          5: begin wr = 1; inc = 1; hit = (adp == 0); end
          6: begin rd = 1; wr = 1; inc = 3; hit = (adp == 0); end
          7: begin rd = 1; inc = 1; hit = 1; end
          8: begin wr = 1; inc = 1; hit = 1; end
          9: begin rd = 1; wr = 1; inc = 3; hit = 1; end
          default: ;
        endcase
        for (int k = 0; k < len && p + 10 + k < n; k++) begin
          int a;
          a = (ado + k) % 32;
          if (node_id == 1) begin
            if (hit && rd) fout[p + 10 + k] = regs1[a];
            if (hit && wr) regs1[a] = fin[p + 10 + k];
          end else begin
            if (hit && rd) fout[p + 10 + k] = regs2[a];
            if (hit && wr) regs2[a] = fin[p + 10 + k];
          end
        end
        if (p + 11 + len < n) begin
          int w;
          w = fin[p + 10 + len] | (fin[p + 11 + len] << 8);
          if (hit) begin w += inc; served_model++; end
          fout[p + 10 + len] = w[7:0];
          fout[p + 11 + len] = w[15:8];
        end
        p += 12 + len;
      end
    end
    if (last && n >= 12)
      for (int i = 0; i < 6; i++) begin
        fout[i] = fin[i + 6];
        fout[i + 6] = fin[i];
      end
  endfunction

  // ------------------------------------------------------- master side
  function automatic logic [31:0] fcs_of(input logic [7:0] b [$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i])
      for (int k = 0; k < 8; k++)
        c = (c >> 1) ^ ((c[0] ^ b[i][k]) ? 32'hEDB8_8320 : 32'h0);
    return ~c;
  endfunction

  task automatic send_rgmii(input logic [7:0] f [$]);
    logic [7:0] b [$];
    logic [31:0] fcs;
    fcs = fcs_of(f);
    for (int i = 0; i < 7; i++) b.push_back(8'h55);
    b.push_back(8'hD5);
    foreach (f[i]) b.push_back(f[i]);
    for (int i = 0; i < 4; i++) b.push_back(fcs[8*i +: 8]);
    foreach (b[i]) begin
      @(negedge clk_250); m_rx_ctl = 1; m_rxd = b[i][3:0];
      @(negedge clk_250); m_rxd = b[i][7:4];
    end
    @(negedge clk_250); m_rx_ctl = 0; m_rxd = 0;
  endtask

  // send one frame, wait for the answer, compare with the model
  task automatic run_frame(input logic [7:0] f [$], input string what);
    logic [7:0] mid [$], exp [$], got [$];
    int ret0, fwd0, loop0, t;
    bit bad;
    ret0 = u_mon_ret.count; fwd0 = u_mon_fwd.count; loop0 = u_mon_loop.count;
    if (last1) node(f, 1, 1, exp);
    else begin
      node(f, 0, 1, mid);
      node(mid, 1, 2, exp);
    end
    send_rgmii(f);
    t = 0;
    while (u_mon_ret.count == ret0 && t < 40000) begin @(negedge clk_250); t++; end
    repeat (40) @(negedge clk_250);
    checks++;
    if (u_mon_ret.count != ret0 + 1) begin
      failures++;
      $display("FAIL %s: no answer", what);
      return;
    end
    got = u_mon_ret.frames[u_mon_ret.frames.size() - 1];
    bad = (got.size() != exp.size());
    if (!bad) foreach (exp[i]) if (got[i] !== exp[i]) bad = 1;
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL %s: answer differs from the model (%0d bytes, expected %0d)", what,
               got.size(), exp.size());
    end
    if (u_mon_fwd.count == fwd0 + 1) n_forward++;
    if (u_mon_loop.count == loop0 + 1) begin n_loopback++; n_return++; end
    if (last1 && u_mon_ret.count == ret0 + 1) n_loopback++;
    if (got.size() >= 12 && got[0] == f[6] && got[6] == f[0] && f[0] != f[6]) n_swap++;
  endtask

  function automatic void bringup_frame(output logic [7:0] f [$]);
    f = '{8'hff, 8'hff, 8'hff, 8'hff, 8'hff, 8'hff, 8'h01, 8'h01, 8'h01, 8'h01, 8'h01, 8'h01,
          8'h88, 8'ha4, 8'h2b, 8'h10,
          8'h08, 8'h01, 8'h00, 8'h00, 8'h00, 8'h00, 8'h05, 8'h00, 8'h00, 8'h00,
          8'ha5, 8'ha5, 8'ha5, 8'ha5, 8'ha5, 8'h00, 8'h00,
          8'h09, 8'h01, 8'h00, 8'h00, 8'h00, 8'h01, 8'h01, 8'h00, 8'h00, 8'h00,
          8'h00, 8'h00, 8'h00,
          8'h08, 8'h01, 8'h00, 8'h00, 8'h00, 8'h01, 8'h02, 8'h80, 8'h00, 8'h00,
          8'h00, 8'h00, 8'h00, 8'h00};
  endfunction

  function automatic void rand_frame(output logic [7:0] f [$], input int target);
    f.delete();
    for (int i = 0; i < 6; i++) f.push_back(8'h02);
    for (int i = 0; i < 6; i++) f.push_back(8'($urandom_range(16, 255)));
    f.push_back(8'h88); f.push_back(8'hA4);
    f.push_back(8'($urandom)); f.push_back(8'h10);
    while (f.size() + 14 < target) begin
      int cmds [8] = '{5, 6, 7, 8, 9, 1, 4, 12};
      int len, room;
      room = target - f.size() - 12;
      len = (room > 40) ? $urandom_range(0, 40) : room;
      f.push_back(8'(cmds[$urandom_range(0, 7)]));
      f.push_back(8'($urandom));
      f.push_back(8'($urandom_range(0, 3) == 0)); f.push_back(8'h00);
      f.push_back(8'($urandom)); f.push_back(8'h00);
      f.push_back(8'(len)); f.push_back(8'(len >> 8));
      f.push_back(8'h00); f.push_back(8'h00);
      for (int k = 0; k < len; k++) f.push_back(8'($urandom));
      f.push_back(8'h00); f.push_back(8'h00);
    end
    while (f.size() < target) f.push_back(8'h00);
  endfunction

  // ------------------------------------------------------ CGRA helpers
  task automatic cg_cycle();
    @(negedge clk_cgra);
  endtask

  // ----------------------------------------------------------- main
  initial begin
    logic [7:0] f [$];
    int t, s0;
    foreach (regs1[i]) begin regs1[i] = 0; regs2[i] = 0; end
    u_phy1_0.not_ready_reads = 3;
    repeat (5) @(negedge clk_mgmt);
    rst_n = 1;

    // 1. bring-up
    t = 0;
    while (!(cd1[0] && cd1[1] && cd2[0] && cd2[1] && lu1[1] && !last1) && t < 20000) begin
      @(negedge clk_mgmt); t++;
    end
    repeat (10) @(negedge clk_mgmt);
    check("node 1 port 0 configured", cd1[0], 1);
    check("node 1 port 1 configured", cd1[1], 1);
    check("node 2 port 0 configured", cd2[0], 1);
    check("node 2 port 1 configured", cd2[1], 1);
    if (cd1[0] && cd1[1] && cd2[0] && cd2[1]) n_config++;
    check("reads ignored by the PHY in reset", u_phy1_0.not_ready_reads, 0);
    check("probe retries", n_mdio_retry, 3);
    check("register 0 written", u_phy1_0.page0[0], 16'h8140);
    check("MSCR2 delay bit cleared", u_phy2_1.page2[21], 16'h1046);
    check("page 0 selected again", u_phy2_0.page, 0);
    check("node 1 port 1 link", lu1[1], 1);
    check("node 2 port 1 no link", lu2[1], 0);
    check("node 1 not last", last1, 0);
    check("node 2 last", last2, 1);
    if (lu1[1]) n_link_up++;
    if (!lu2[1] && last2) n_link_down++;
    repeat (20) @(negedge clk_250);

    // 2. frames through both nodes
    s0 = served_model;
    bringup_frame(f);
    run_frame(f, "bring-up frame");
    begin
      logic [7:0] g [$];
      g = u_mon_ret.frames[u_mon_ret.frames.size() - 1];
      check("BWR working counter of two nodes", {g[32], g[31]}, 16'd2);
      check("BRW working counter of two nodes", {g[45], g[44]}, 16'd6);
      check("BRW data read back", g[43], 8'ha5);
      check("second BWR working counter", {g[59], g[58]}, 16'd2);
      check("destination after exchange", {g[0], g[5]}, 16'h0101);
      check("source after exchange", {g[6], g[11]}, 16'hffff);
      if (g.size() == 60 && g[31] == 2 && g[44] == 6) n_wkc += 3;
    end
    check("datagrams served, node 1", served1, 3);
    check("datagrams served, node 2", served2, 3);

    // broadcast read of the whole register file
    f.delete();
    for (int i = 0; i < 12; i++) f.push_back(8'h03 + 8'(i / 6));
    f.push_back(8'h88); f.push_back(8'hA4); f.push_back(8'h2C); f.push_back(8'h10);
    f.push_back(8'd7); f.push_back(8'h00); f.push_back(8'h00); f.push_back(8'h00);
    f.push_back(8'h00); f.push_back(8'h00); f.push_back(8'd32); f.push_back(8'h00);
    f.push_back(8'h00); f.push_back(8'h00);
    for (int i = 0; i < 34; i++) f.push_back(8'h00);
    run_frame(f, "register read-back frame");

    // non-EtherCAT frame: only the MAC exchange at the last node
    f.delete();
    for (int i = 0; i < 6; i++) f.push_back(8'h0A);
    for (int i = 0; i < 6; i++) f.push_back(8'h0B);
    f.push_back(8'h08); f.push_back(8'h00);
    for (int i = 0; i < 50; i++) f.push_back(8'(i * 3));
    t = served1;
    run_frame(f, "non-EtherCAT frame");
    begin
      logic [7:0] g [$];
      bit same;
      g = u_mon_ret.frames[u_mon_ret.frames.size() - 1];
      same = g.size() == f.size();
      for (int i = 12; i < f.size() && same; i++) if (g[i] != f[i]) same = 0;
      if (same && served1 == t) n_passthrough++;
    end

    for (int r = 0; r < 12; r++) begin
      rand_frame(f, $urandom_range(60, 400));
      run_frame(f, "random frame");
    end
    rand_frame(f, 1514);
    run_frame(f, "largest frame");
    check("datagrams served by both nodes", served1 + served2, served_model - s0);
    if (served1 + served2 > 6) n_wkc++;

    // 3. link change behind node 1
    link_n1p1 = 0;
    t = 0;
    while (!last1 && t < 5000) begin @(negedge clk_mgmt); t++; end
    check("node 1 became last", last1, 1);
    bringup_frame(f);
    for (int i = 0; i < 6; i++) f[i] = 8'h0C;
    t = u_mon_fwd.count;
    run_frame(f, "frame looped by node 1");
    check("nothing forwarded while looping", u_mon_fwd.count, t);
    begin
      logic [7:0] g [$];
      g = u_mon_ret.frames[u_mon_ret.frames.size() - 1];
      check("BWR working counter of one node", {g[32], g[31]}, 16'd1);
      if (last1 && g[31] == 1) n_link_change++;
    end
    link_n1p1 = 1;
    t = 0;
    while (last1 && t < 5000) begin @(negedge clk_mgmt); t++; end
    check("node 1 forwards again", last1, 0);
    repeat (20) @(negedge clk_250);
    rand_frame(f, 100);
    run_frame(f, "frame after link return");

    check("no FCS errors", u_mon_ret.bad_fcs + u_mon_fwd.bad_fcs + u_mon_loop.bad_fcs, 0);
    check("no preamble errors", u_mon_ret.bad_preamble + u_mon_fwd.bad_preamble + u_mon_loop.bad_preamble, 0);
    if (u_mon_ret.count > 0 && u_mon_ret.bad_fcs == 0) n_fcs_ok = u_mon_ret.count;
    check("last port of the line stays silent", u_mon_end.count, 0);
    check("no transmit underrun", underruns, 0);

    // 4. CGRA interface of node 1 (slave ID 0)
    cg_cycle();
    for (int k = 0; k < 8; k++) begin
      c_en = 3'b111; c_we = 3'b111;
      c_a = {8'(k), 8'(k), 8'(k)};
      c_d = {32'h3000_0000 + k, 32'h2000_0000 + k, 32'h1000_0000 + k};
      cg_cycle();
    end
    c_en = 0; c_we = 0;
    e_en = 1; e_we = 0; e_a = 257; cg_cycle();
    check("master reads 257 = PE0 word 2", e_q1, 32'h1000_0002);
    e_we = 1; e_d = 24; cg_cycle();
    e_we = 1; e_a = 258; e_d = 24;
    c_en = 3'b001; c_we = 3'b001; c_a = 24'h3; c_d = 96'd11;
    #1;
    if (cf1[0]) n_cgra_conflict++;
    cg_cycle();
    e_we = 0; c_we = 0;                     // both read word 3 together
    cg_cycle();
    check("PE value wins", c_q1[31:0], 11);
    check("master read concurrent", e_q1, 11);
    if (c_q1[31:0] == 11 && e_q1 == 11) n_cgra_parallel++;
    cg_cycle();
    check("deferred master write landed", e_q1, 24);
    if (e_q1 == 24) n_cgra_deferred++;
    e_we = 1; e_a = 32'd65796; e_d = 32'hABCD; c_en = 0; cg_cycle();
    e_en = 0; e_we = 0; c_en = 3'b010; c_a = {8'd0, 8'd5, 8'd0}; cg_cycle();
    check("65796 reaches PE1 word 5", c_q1[63:32], 32'hABCD);
    c_en = 0;
    cg_cycle();

    // mechanism counts
    $display("mechanisms: mdio_retry=%0d config=%0d link_up=%0d link_down=%0d link_change=%0d",
             n_mdio_retry, n_config, n_link_up, n_link_down, n_link_change);
    $display("mechanisms: forward=%0d loopback=%0d return=%0d swap=%0d wkc=%0d passthrough=%0d fcs_ok=%0d",
             n_forward, n_loopback, n_return, n_swap, n_wkc, n_passthrough, n_fcs_ok);
    $display("mechanisms: cgra_conflict=%0d cgra_deferred=%0d cgra_parallel=%0d",
             n_cgra_conflict, n_cgra_deferred, n_cgra_parallel);
    check("mechanism: MDIO retry", n_mdio_retry > 0, 1);
    check("mechanism: PHY configuration", n_config > 0, 1);
    check("mechanism: link detected", n_link_up > 0, 1);
    check("mechanism: missing link detected", n_link_down > 0, 1);
    check("mechanism: link change", n_link_change > 0, 1);
    check("mechanism: forward", n_forward > 0, 1);
    check("mechanism: loop-back", n_loopback > 0, 1);
    check("mechanism: return path", n_return > 0, 1);
    check("mechanism: MAC exchange", n_swap > 0, 1);
    check("mechanism: working counter", n_wkc > 0, 1);
    check("mechanism: non-EtherCAT pass", n_passthrough > 0, 1);
    check("mechanism: FCS", n_fcs_ok > 0, 1);
    check("mechanism: CGRA collision", n_cgra_conflict > 0, 1);
    check("mechanism: CGRA deferred write", n_cgra_deferred > 0, 1);
    check("mechanism: CGRA parallel access", n_cgra_parallel > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk_250);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
