// PHY bring-up and link supervision for one Ethernet port.
//
// After reset the controller drives the MDIO master through this sequence:
//   1. read PHY register 0 until the PHY answers (a value other than all
//      ones, which is what the pulled-up line returns while the PHY is still
//      held in reset), waiting RETRY_WAIT cycles between attempts;
//   2. write register 0 with PHY_CTRL_VALUE (1000 Mb/s, full duplex);
//   3. select register page 2 (write 2 to the page register, 22);
//   4. read "MAC Specific Control Register 2" (page 2, register 21), clear its
//      transmit-clock delay bit (bit 4) and write it back, so the only RGMII
//      transmit skew is the one added on the FPGA side;
//   5. select page 0 again;
//   6. write register 0 again with bit 15 also set, a copper software reset
//      that makes the new settings take effect; config_done_o rises;
//   7. RDLINK / CHECKLINK, forever: read "Copper Specific Status Register 1"
//      (page 0, register 17) and copy its real-time link bit (bit 10) to
//      link_up_o, then wait POLL_WAIT cycles.  The link is polled
//      repeatedly because it comes up only some time after reset.
// is_last_o is high while the link is down: nothing is connected behind
// this port, so the node is the last one in the chain and loops frames back.
//
// The command port matches mdio_master: a one-cycle cmd_en_o with the
// operands, then the controller waits for mdio_done_i.
//
// The sequence, the page register, register 17 bit 10, the value 140 hex and
// the soft reset bit follow the described bring-up.  The register number of
// MAC Specific Control Register 2 (21) and its delay bit (4) come from the
// PHY's register map, not from the description; so do the retry and poll
// intervals.  The MAC speed setting and the MAC receiver, transmitter and
// address set-up of the earlier bring-up have no counterpart here because
// the RGMII block is fixed at 1 Gb/s; the auto-negotiation start listed
// there is not issued either, the PHY keeps the fixed mode written to
// register 0.
module phy_controller #(
  parameter logic [4:0]  PHY_ADDR       = 5'd0,
  parameter logic [15:0] PHY_CTRL_VALUE = 16'h0140,
  parameter int unsigned RETRY_WAIT     = 1000,
  parameter int unsigned POLL_WAIT      = 1000
) (
  input  logic        clk,
  input  logic        rst_n,
  // MDIO master command port
  output logic        cmd_en_o,
  output logic        cmd_rw_o,       // 1 read, 0 write
  output logic [4:0]  cmd_phy_o,
  output logic [4:0]  cmd_reg_o,
  output logic [15:0] cmd_wdata_o,
  input  logic [15:0] mdio_rdata_i,
  input  logic        mdio_done_i,
  // status
  output logic        config_done_o,
  output logic        link_up_o,
  output logic        is_last_o
);

  localparam logic [4:0] REG_CTRL   = 5'd0;
  localparam logic [4:0] REG_CSSR1  = 5'd17;
  localparam logic [4:0] REG_MSCR2  = 5'd21;
  localparam logic [4:0] REG_PAGE   = 5'd22;
  localparam int unsigned LINK_BIT  = 10;
  localparam int unsigned TXDLY_BIT = 4;
  localparam int unsigned WAIT_MAX  = (RETRY_WAIT > POLL_WAIT) ? RETRY_WAIT : POLL_WAIT;
  localparam int unsigned WW        = $clog2(WAIT_MAX + 1);

  typedef enum logic [3:0] {
    S_PROBE, S_PROBE_WAIT, S_WRCTRL, S_PAGE2, S_RD_MSCR2, S_WR_MSCR2, S_PAGE0,
    S_SWRESET, S_RDLINK, S_CHECKLINK
  } state_e;

  state_e          state;
  logic            issued;       // command of this state already sent
  logic [WW-1:0]   wait_cnt;

  assign cmd_phy_o = PHY_ADDR;
  assign is_last_o = !link_up_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_PROBE;
      issued        <= 1'b0;
      wait_cnt      <= '0;
      cmd_en_o      <= 1'b0;
      cmd_rw_o      <= 1'b1;
      cmd_reg_o     <= REG_CTRL;
      cmd_wdata_o   <= '0;
      config_done_o <= 1'b0;
      link_up_o     <= 1'b0;
    end else begin
      cmd_en_o <= 1'b0;
      unique case (state)
        S_PROBE_WAIT, S_CHECKLINK: begin
          // idle interval before the next read
          if (wait_cnt == '0) state <= (state == S_PROBE_WAIT) ? S_PROBE : S_RDLINK;
          else wait_cnt <= wait_cnt - 1'b1;
        end
        default: begin
          if (!issued) begin
            issued   <= 1'b1;
            cmd_en_o <= 1'b1;
            unique case (state)
              S_PROBE:    begin cmd_rw_o <= 1'b1; cmd_reg_o <= REG_CTRL; end
              S_WRCTRL:   begin cmd_rw_o <= 1'b0; cmd_reg_o <= REG_CTRL; cmd_wdata_o <= PHY_CTRL_VALUE; end
              S_PAGE2:    begin cmd_rw_o <= 1'b0; cmd_reg_o <= REG_PAGE; cmd_wdata_o <= 16'd2; end
              S_RD_MSCR2: begin cmd_rw_o <= 1'b1; cmd_reg_o <= REG_MSCR2; end
              S_WR_MSCR2: begin
                cmd_rw_o    <= 1'b0;
                cmd_reg_o   <= REG_MSCR2;
                cmd_wdata_o <= mdio_rdata_i & ~(16'd1 << TXDLY_BIT);
              end
              S_PAGE0:    begin cmd_rw_o <= 1'b0; cmd_reg_o <= REG_PAGE; cmd_wdata_o <= 16'd0; end
              S_SWRESET:  begin cmd_rw_o <= 1'b0; cmd_reg_o <= REG_CTRL; cmd_wdata_o <= PHY_CTRL_VALUE | 16'h8000; end
              S_RDLINK:   begin cmd_rw_o <= 1'b1; cmd_reg_o <= REG_CSSR1; end
              default: ;
            endcase
          end else if (mdio_done_i) begin
            issued <= 1'b0;
            unique case (state)
              S_PROBE: begin
                if (mdio_rdata_i == 16'hFFFF) begin
                  state    <= S_PROBE_WAIT;
                  wait_cnt <= WW'(RETRY_WAIT);
                end else begin
                  state <= S_WRCTRL;
                end
              end
              S_WRCTRL:   state <= S_PAGE2;
              S_PAGE2:    state <= S_RD_MSCR2;
              S_RD_MSCR2: state <= S_WR_MSCR2;
              S_WR_MSCR2: state <= S_PAGE0;
              S_PAGE0:    state <= S_SWRESET;
              S_SWRESET: begin
                state         <= S_RDLINK;
                config_done_o <= 1'b1;
              end
              S_RDLINK: begin
                link_up_o <= mdio_rdata_i[LINK_BIT];
                state     <= S_CHECKLINK;
                wait_cnt  <= WW'(POLL_WAIT);
              end
              default: state <= S_PROBE;
            endcase
          end
        end
      endcase
    end
  end

endmodule
