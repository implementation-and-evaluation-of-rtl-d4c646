// Self-checking testbench for mdio_master.
// A behavioural PHY decodes the frames.  Checks: the serial pattern of a
// write frame bit by bit against the clause-22 layout, that writes land in
// the PHY registers, that reads return them, that a read with no PHY
// answering returns all ones, and the frame duration of 128 * MDC_DIV
// cycles (done_o one cycle after the last MDC edge).
module tb_mdio_master;
  localparam int unsigned MDC_DIV = 2;

  logic clk = 0, rst_n = 0;
  logic en = 0, rw = 0;
  logic [4:0] phy_addr = 0, reg_addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic busy, done, mdc, mdio_o, mdio_oe, mdio_i;
  logic phy_oe, phy_o, line;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign line   = mdio_oe ? mdio_o : (phy_oe ? phy_o : 1'b1);
  assign mdio_i = line;

  mdio_master #(.MDC_DIV(MDC_DIV)) dut (
    .clk(clk), .rst_n(rst_n), .en_i(en), .rw_i(rw), .phy_addr_i(phy_addr),
    .reg_addr_i(reg_addr), .wdata_i(wdata), .rdata_o(rdata), .busy_o(busy),
    .done_o(done), .mdc_o(mdc), .mdio_o(mdio_o), .mdio_oe_o(mdio_oe), .mdio_i(mdio_i));

  phy_mdio_model #(.ADDR(5'd0)) phy (
    .mdc(mdc), .mdio_line(line), .phy_oe(phy_oe), .phy_o(phy_o), .link(1'b1));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // capture the bits driven by the master at each rising MDC edge
  logic [63:0] seen;
  logic [63:0] seen_oe;
  always @(posedge mdc) begin
    seen    <= {seen[62:0], line};
    seen_oe <= {seen_oe[62:0], mdio_oe};
  end

  task automatic xfer(input logic r, input logic [4:0] pa, input logic [4:0] ra,
                      input logic [15:0] d, output int cycles);
    @(negedge clk);
    en = 1; rw = r; phy_addr = pa; reg_addr = ra; wdata = d;
    @(negedge clk);
    en = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // write frame pattern
    xfer(1'b0, 5'd0, 5'd22, 16'h0002, cyc);
    check("write frame bits", seen,
          {32'hFFFF_FFFF, 2'b01, 2'b01, 5'd0, 5'd22, 2'b10, 16'h0002});
    check("write frame driven", seen_oe, 64'hFFFF_FFFF_FFFF_FFFF);
    check("frame duration", cyc, 128 * MDC_DIV + 1);
    check("page written", phy.page, 16'd2);

    xfer(1'b0, 5'd0, 5'd21, 16'hA5C3, cyc);
    check("page 2 register written", phy.page2[21], 16'hA5C3);

    // read it back
    xfer(1'b1, 5'd0, 5'd21, 16'h0000, cyc);
    check("read data", rdata, 16'hA5C3);
    check("read frame header", 32'(seen[31:18]), 32'({2'b01, 2'b10, 5'd0, 5'd21}));
    check("read preamble", seen[63:32], 32'hFFFF_FFFF);
    check("read releases line", seen_oe[17:0], 18'd0);

    // page 0, link bit
    xfer(1'b0, 5'd0, 5'd22, 16'h0000, cyc);
    xfer(1'b1, 5'd0, 5'd17, 16'h0000, cyc);
    check("link bit", rdata[10], 1'b1);

    // random writes and reads on page 0
    for (int n = 0; n < 6; n++) begin
      logic [4:0] ra;
      logic [15:0] v;
      ra = 5'($urandom_range(1, 15));
      v  = 16'($urandom);
      xfer(1'b0, 5'd0, ra, v, cyc);
      xfer(1'b1, 5'd0, ra, 16'h0, cyc);
      check("random read back", rdata, v);
    end

    // wrong PHY address: nobody answers
    xfer(1'b1, 5'd7, 5'd0, 16'h0000, cyc);
    check("no answer reads ones", rdata, 16'hFFFF);

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
