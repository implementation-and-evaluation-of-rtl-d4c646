// Behavioural model of the management interface of a Gigabit Ethernet PHY
// (testbench only).  It decodes clause-22 MDIO frames on the rising edge of
// MDC, keeps a register file with a page register (22) for pages 0 and 2,
// answers reads by driving the turnaround zero and the 16 data bits after
// falling MDC edges, and returns the input link as bit 10 of register 17
// on page 0.  While not_ready_reads is non-zero the PHY ignores frames and
// counts them down, as a PHY still held in reset would.
module phy_mdio_model #(
  parameter logic [4:0] ADDR = 5'd0
) (
  input  logic mdc,
  input  logic mdio_line,     // resolved line value
  output logic phy_oe,
  output logic phy_o,
  input  logic link
);
  logic [15:0] page0 [32];
  logic [15:0] page2 [32];
  logic [15:0] page;
  int          ones;
  int          idx;           // frame bit index of the bit just sampled
  logic        in_frame;
  logic [13:0] hdr;
  logic [15:0] wdata, rdata;
  logic        rd;
  int          not_ready_reads;
  int          writes, reads;

  initial begin
    for (int i = 0; i < 32; i++) begin page0[i] = 16'h0000; page2[i] = 16'h0000; end
    page0[0]  = 16'h1140;
    page2[21] = 16'h1056;       // transmit delay bit 4 set out of reset
    page = 0; ones = 0; idx = 0; in_frame = 0; phy_oe = 0; phy_o = 1;
    not_ready_reads = 0; writes = 0; reads = 0; rd = 0; hdr = 0; wdata = 0; rdata = 0;
  end

  function automatic logic [15:0] read_reg(input logic [4:0] r);
    if (r == 5'd22) return page;
    if (page == 16'd2) return page2[r];
    if (r == 5'd17) return (page0[17] & ~16'h0400) | (link ? 16'h0400 : 16'h0);
    return page0[r];
  endfunction

  always @(posedge mdc) begin
    if (!in_frame) begin
      if (mdio_line) ones <= ones + 1;
      else begin
        if (ones >= 32) begin in_frame <= 1; idx <= 32; end  // start bit '0'
        ones <= 0;
      end
    end else begin
      idx <= idx + 1;
      if (idx + 1 <= 45) hdr <= {hdr[12:0], mdio_line};       // start(1) op phy reg
      if (idx + 1 == 46) rd <= (hdr[11:10] == 2'b10);
      if (idx + 1 >= 48 && !rd) wdata <= {wdata[14:0], mdio_line};
      if (idx + 1 == 63) begin
        in_frame <= 0;
        ones <= 0;
        if (!rd && hdr[9:5] == ADDR && not_ready_reads == 0) begin
          writes <= writes + 1;
          if (hdr[4:0] == 5'd22) page <= {wdata[14:0], mdio_line};
          else if (page == 16'd2) page2[hdr[4:0]] <= {wdata[14:0], mdio_line};
          else page0[hdr[4:0]] <= {wdata[14:0], mdio_line};
        end
      end
    end
  end

  // drive read data after falling edges: the bit with index idx+1 is next
  always @(negedge mdc) begin
    phy_oe <= 0;
    phy_o  <= 1;
    if (in_frame && rd && hdr[9:5] == ADDR) begin
      if (idx == 46) begin
        if (not_ready_reads > 0) not_ready_reads <= not_ready_reads - 1;
        else begin
          phy_oe <= 1; phy_o <= 0;           // second turnaround bit
          rdata  <= read_reg(hdr[4:0]);
          reads  <= reads + 1;
        end
      end else if (idx >= 47 && idx < 63 && phy_oe) begin
        phy_oe <= 1;
        phy_o  <= rdata[15 - (idx - 47)];
      end
    end
  end
endmodule
