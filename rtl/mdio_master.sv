// MII management (MDIO) master.
//
// A transfer is started with a one-cycle en_i pulse carrying the read/write
// flag, the PHY address, the register address and, for a write, the data.
// The block then clocks out one IEEE 802.3 clause-22 management frame on
// the MDIO line: 32 preamble ones, start "01", opcode ("10" read, "01"
// write), 5-bit PHY address, 5-bit register address, a 2-bit turnaround and
// 16 data bits, most significant bit first.  A counter of bits already sent
// selects the current bit.  For a write the master drives all 64 bits (the
// turnaround is "10"); for a read it releases the line from the turnaround
// on and shifts in the 16 data bits the PHY returns.
//
// MDC is generated here: it toggles every MDC_DIV clock cycles, so with the
// 2.5 MHz management clock and MDC_DIV = 1 the line runs at 1.25 MHz, below
// the 2.5 MHz limit.  The master changes MDIO just after a falling MDC edge
// and samples read data at the rising edge.  The line is split into mdio_o,
// mdio_oe_o and mdio_i for an I/O buffer at the pin.  busy_o is high during a
// transfer, done_o pulses for one cycle at its end, and rdata_o then holds
// the read value (all ones when no PHY drives the line, since it is pulled
// up).  A frame takes 128 * MDC_DIV cycles; done_o
// follows one cycle after the last MDC edge.  The frame format follows the
// management interface described for the PHY; the MDC divider, the sampling
// edges and the handshake are this design's choices.
module mdio_master #(
  parameter int unsigned MDC_DIV = 1   // clk cycles per MDC half period
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en_i,
  input  logic        rw_i,        // 1: read, 0: write
  input  logic [4:0]  phy_addr_i,
  input  logic [4:0]  reg_addr_i,
  input  logic [15:0] wdata_i,
  output logic [15:0] rdata_o,
  output logic        busy_o,
  output logic        done_o,
  output logic        mdc_o,
  output logic        mdio_o,
  output logic        mdio_oe_o,
  input  logic        mdio_i
);

  localparam int unsigned FRAME_BITS = 64;
  localparam int unsigned DRIVEN_READ = 46;  // bits driven by the master on a read
  localparam int unsigned DATA_START  = 48;  // first data bit

  logic [63:0] shreg;
  logic [5:0]  bit_cnt;
  logic        rd_q;
  logic [$clog2(MDC_DIV+1)-1:0] div_cnt;
  logic        tick;

  assign tick = (32'(div_cnt) == MDC_DIV - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bit_cnt   <= '0;
      rd_q      <= 1'b0;
      div_cnt   <= '0;
      busy_o    <= 1'b0;
      done_o    <= 1'b0;
      mdc_o     <= 1'b0;
      mdio_o    <= 1'b1;
      mdio_oe_o <= 1'b0;
      rdata_o   <= '0;
    end else begin
      done_o <= 1'b0;
      if (!busy_o) begin
        mdc_o   <= 1'b0;
        div_cnt <= '0;
        if (en_i) begin
          shreg     <= {32'hFFFF_FFFF, 2'b01, (rw_i ? 2'b10 : 2'b01),
                        phy_addr_i, reg_addr_i,
                        (rw_i ? 2'b11 : 2'b10), (rw_i ? 16'hFFFF : wdata_i)};
          rd_q      <= rw_i;
          bit_cnt   <= '0;
          busy_o    <= 1'b1;
          mdio_o    <= 1'b1;        // first preamble bit
          mdio_oe_o <= 1'b1;
        end
      end else begin
        div_cnt <= tick ? '0 : div_cnt + 1'b1;
        if (tick) begin
          mdc_o <= ~mdc_o;
          if (!mdc_o) begin
            // rising MDC edge: the PHY samples, the master samples read data
            if (rd_q && bit_cnt >= DATA_START[5:0])
              rdata_o <= {rdata_o[14:0], mdio_i};
          end else begin
            // falling MDC edge: move to the next bit
            if (bit_cnt == 6'(FRAME_BITS - 1)) begin
              busy_o    <= 1'b0;
              done_o    <= 1'b1;
              mdio_oe_o <= 1'b0;
              mdio_o    <= 1'b1;
            end else begin
              bit_cnt   <= bit_cnt + 1'b1;
              shreg     <= {shreg[62:0], 1'b1};
              mdio_o    <= shreg[62];
              mdio_oe_o <= !rd_q || (bit_cnt + 1'b1 < 6'(DRIVEN_READ));
            end
          end
        end
      end
    end
  end

endmodule
