// Self-checking testbench for phy_controller, run together with mdio_master
// and a behavioural PHY that ignores its first two frames (still in reset).
// Checks: the controller retries until the PHY answers, the transmit delay
// bit of MAC Specific Control Register 2 is cleared and the rest of that
// register kept, page 0 is selected again, register 0 ends at 8140 hex
// (soft reset, 1000 Mb/s, full duplex) after five writes in all (140 hex to
// register 0 first), config_done rises, and link_up /
// is_last follow the PHY link bit within a few poll periods, both ways.
module tb_phy_controller;
  logic clk = 0, rst_n = 0;
  logic cmd_en, cmd_rw, done;
  logic [4:0] cmd_phy, cmd_reg;
  logic [15:0] cmd_wdata, rdata;
  logic config_done, link_up, is_last;
  logic mdc, mdio_o, mdio_oe, phy_oe, phy_o, line;
  logic link = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign line = mdio_oe ? mdio_o : (phy_oe ? phy_o : 1'b1);

  phy_controller #(.RETRY_WAIT(20), .POLL_WAIT(20)) dut (
    .clk(clk), .rst_n(rst_n), .cmd_en_o(cmd_en), .cmd_rw_o(cmd_rw),
    .cmd_phy_o(cmd_phy), .cmd_reg_o(cmd_reg), .cmd_wdata_o(cmd_wdata),
    .mdio_rdata_i(rdata), .mdio_done_i(done), .config_done_o(config_done),
    .link_up_o(link_up), .is_last_o(is_last));

  mdio_master #(.MDC_DIV(1)) u_mdio (
    .clk(clk), .rst_n(rst_n), .en_i(cmd_en), .rw_i(cmd_rw), .phy_addr_i(cmd_phy),
    .reg_addr_i(cmd_reg), .wdata_i(cmd_wdata), .rdata_o(rdata), .busy_o(),
    .done_o(done), .mdc_o(mdc), .mdio_o(mdio_o), .mdio_oe_o(mdio_oe), .mdio_i(line));

  phy_mdio_model #(.ADDR(5'd0)) phy (
    .mdc(mdc), .mdio_line(line), .phy_oe(phy_oe), .phy_o(phy_o), .link(link));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  int probes = 0;
  always @(posedge clk) if (cmd_en && cmd_rw && cmd_reg == 5'd0) probes++;

  initial begin
    phy.not_ready_reads = 2;
    repeat (4) @(negedge clk);
    rst_n = 1;
    check("link down after reset", link_up, 1'b0);
    check("last while link unknown", is_last, 1'b1);
    wait (config_done);
    check("probe retried until the PHY answered", probes, 3);
    check("transmit delay bit cleared", phy.page2[21], 16'h1046);
    check("page 0 selected", phy.page, 16'd0);
    check("soft reset, 1000 Mb/s, full duplex", phy.page0[0], 16'h8140);
    check("register writes (control, page, MSCR2, page, reset)", phy.writes, 5);
    repeat (600) @(negedge clk);
    check("link still down", link_up, 1'b0);
    check("still last in chain", is_last, 1'b1);
    link = 1;
    repeat (600) @(negedge clk);
    check("link up seen", link_up, 1'b1);
    check("not last any more", is_last, 1'b0);
    link = 0;
    repeat (600) @(negedge clk);
    check("link loss seen", link_up, 1'b0);
    check("last again", is_last, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
