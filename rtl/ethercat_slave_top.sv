// One EtherCAT slave node with two Gigabit Ethernet ports, and the memory
// interface the node offers to a CGRA.
//
// Port 0 faces the master, port 1 the next node of a line topology.  Each
// port has its own PHY management path (phy_controller driving mdio_master)
// and its own RGMII block.  The streaming generator sits between the two
// RGMII blocks: frames from port 0 are processed on the fly and sent on out
// of port 1, or, while the PHY of port 1 reports no link (the node is the
// last one in the chain), looped back out of port 0 with the MAC addresses
// exchanged.  Frames coming back on port 1 go straight out of port 0.
//
// Clocks: clk_250 (250 MHz) runs the RGMII blocks and the streaming
// generator, one nibble per cycle; clk_mgmt (2.5 MHz) runs the PHY
// controllers and MDIO masters; clk_cgra runs the CGRA interface.  They are
// produced outside this module by the board's clock manager.  The
// last-in-chain flag crosses from clk_mgmt to clk_250 through a two-stage
// synchroniser.  rst_n is active low and asynchronous; it must be released
// synchronously to each clock outside this module.
//
// The MDIO lines are split (mdio_o, mdio_oe, mdio_i) for the bidirectional
// I/O buffer at the pin.  The CGRA interface stands beside the Ethernet path
// with its own ports: its master-side port is where an EtherCAT memory access
// would enter, but how the frame processor drives it is not part of this
// design, so both sides are brought out.
//
// The structure (controller, MDIO, RGMII, streaming generator per node, two
// ports, a controller per port, link-based loop-back) follows the described
// node; the synchroniser, the reset scheme and the clock separation are this
// design's choices.
module ethercat_slave_top #(
  parameter logic [15:0] STATION_ADDR = 16'h0000,
  parameter int unsigned REG_COUNT    = 32,
  parameter int unsigned MDC_DIV      = 1,
  parameter int unsigned RETRY_WAIT   = 1000,
  parameter int unsigned POLL_WAIT    = 1000,
  parameter int unsigned NUM_PE       = 3,
  parameter int unsigned DATA_W       = 32,
  parameter int unsigned DATA_AW      = 8,
  parameter int unsigned CONFIG_MAX   = 255
) (
  input  logic        clk_250,
  input  logic        clk_mgmt,
  input  logic        clk_cgra,
  input  logic        rst_n,
  // RGMII, index 0 towards the master, index 1 towards the next node
  input  logic [3:0]  rgmii_rxd    [2],
  input  logic        rgmii_rx_ctl [2],
  output logic [3:0]  rgmii_txd    [2],
  output logic        rgmii_tx_ctl [2],
  output logic        rgmii_txc    [2],
  // MDIO, one management bus per PHY
  output logic        mdc     [2],
  output logic        mdio_o  [2],
  output logic        mdio_oe [2],
  input  logic        mdio_i  [2],
  // status
  output logic        config_done [2],
  output logic        link_up     [2],
  output logic        is_last,
  output logic        ecat_frame,
  output logic        dgram_served,
  output logic        tx_underrun [2],
  // CGRA interface, EtherCAT master side
  input  logic                      ecat_enable_i,
  input  logic                      ecat_we_i,
  input  logic [31:0]               ecat_address_i,
  input  logic [DATA_W-1:0]         ecat_data_i,
  output logic [DATA_W-1:0]         ecat_data_o,
  // CGRA interface, processing element side
  input  logic [NUM_PE-1:0]         cgra_enable_i,
  input  logic [NUM_PE-1:0]         cgra_we_i,
  input  logic [NUM_PE*DATA_AW-1:0] cgra_address_i,
  input  logic [NUM_PE*DATA_W-1:0]  cgra_data_i,
  output logic [NUM_PE*DATA_W-1:0]  cgra_data_o,
  output logic [NUM_PE-1:0]         cgra_conflict_o,
  output logic [NUM_PE-1:0]         cgra_buffer_full_o,
  output logic [NUM_PE-1:0]         cgra_lost_o
);

  // ------------------------------------------------ PHY management, per port
  logic        p1_is_last;

  for (genvar p = 0; p < 2; p++) begin : g_mgmt
    logic        cmd_en, cmd_rw, done;
    logic [4:0]  cmd_phy, cmd_reg;
    logic [15:0] cmd_wdata, rdata;
    logic        port_is_last;

    phy_controller #(
      .RETRY_WAIT (RETRY_WAIT),
      .POLL_WAIT  (POLL_WAIT)
    ) u_ctrl (
      .clk           (clk_mgmt),
      .rst_n         (rst_n),
      .cmd_en_o      (cmd_en),
      .cmd_rw_o      (cmd_rw),
      .cmd_phy_o     (cmd_phy),
      .cmd_reg_o     (cmd_reg),
      .cmd_wdata_o   (cmd_wdata),
      .mdio_rdata_i  (rdata),
      .mdio_done_i   (done),
      .config_done_o (config_done[p]),
      .link_up_o     (link_up[p]),
      .is_last_o     (port_is_last)
    );

    mdio_master #(.MDC_DIV(MDC_DIV)) u_mdio (
      .clk        (clk_mgmt),
      .rst_n      (rst_n),
      .en_i       (cmd_en),
      .rw_i       (cmd_rw),
      .phy_addr_i (cmd_phy),
      .reg_addr_i (cmd_reg),
      .wdata_i    (cmd_wdata),
      .rdata_o    (rdata),
      .busy_o     (),
      .done_o     (done),
      .mdc_o      (mdc[p]),
      .mdio_o     (mdio_o[p]),
      .mdio_oe_o  (mdio_oe[p]),
      .mdio_i     (mdio_i[p])
    );

    if (p == 1) begin : g_last
      assign p1_is_last = port_is_last;
    end
  end

  // last-in-chain flag into the 250 MHz domain
  logic [1:0] last_sync;
  always_ff @(posedge clk_250 or negedge rst_n) begin
    if (!rst_n) last_sync <= 2'b11;
    else        last_sync <= {last_sync[0], p1_is_last};
  end
  assign is_last = last_sync[1];

  // ---------------------------------------------------- RGMII, per port
  logic       rx_valid [2];
  logic [7:0] rx_data  [2];
  logic       rx_sof   [2];
  logic       rx_last  [2];
  logic       tx_valid [2];
  logic [7:0] tx_data  [2];
  logic       tx_last  [2];

  for (genvar p = 0; p < 2; p++) begin : g_port
    rgmii u_rgmii (
      .clk           (clk_250),
      .rst_n         (rst_n),
      .rgmii_rxd     (rgmii_rxd[p]),
      .rgmii_rx_ctl  (rgmii_rx_ctl[p]),
      .rgmii_txd     (rgmii_txd[p]),
      .rgmii_tx_ctl  (rgmii_tx_ctl[p]),
      .rgmii_txc     (rgmii_txc[p]),
      .rx_valid_o    (rx_valid[p]),
      .rx_data_o     (rx_data[p]),
      .rx_sof_o      (rx_sof[p]),
      .rx_last_o     (rx_last[p]),
      .tx_valid_i    (tx_valid[p]),
      .tx_data_i     (tx_data[p]),
      .tx_last_i     (tx_last[p]),
      .tx_busy_o     (),
      .tx_underrun_o (tx_underrun[p])
    );
  end

  // ------------------------------------------------- EtherCAT processing
  logic rx1_sof_unused;
  assign rx1_sof_unused = rx_sof[1];

  streaming_generator #(
    .REG_COUNT    (REG_COUNT),
    .STATION_ADDR (STATION_ADDR)
  ) u_esc (
    .clk            (clk_250),
    .rst_n          (rst_n),
    .is_last_i      (is_last),
    .rx0_valid_i    (rx_valid[0]),
    .rx0_data_i     (rx_data[0]),
    .rx0_sof_i      (rx_sof[0]),
    .rx0_last_i     (rx_last[0]),
    .rx1_valid_i    (rx_valid[1]),
    .rx1_data_i     (rx_data[1]),
    .rx1_last_i     (rx_last[1]),
    .tx0_valid_o    (tx_valid[0]),
    .tx0_data_o     (tx_data[0]),
    .tx0_last_o     (tx_last[0]),
    .tx1_valid_o    (tx_valid[1]),
    .tx1_data_o     (tx_data[1]),
    .tx1_last_o     (tx_last[1]),
    .ecat_frame_o   (ecat_frame),
    .dgram_served_o (dgram_served)
  );

  // ---------------------------------------------------- CGRA interface
  cgra_interface #(
    .NUM_PE     (NUM_PE),
    .DATA_W     (DATA_W),
    .DATA_AW    (DATA_AW),
    .CONFIG_MAX (CONFIG_MAX)
  ) u_cgra_if (
    .clk            (clk_cgra),
    .rst_n          (rst_n),
    .ecat_enable_i  (ecat_enable_i),
    .ecat_we_i      (ecat_we_i),
    .ecat_address_i (ecat_address_i),
    .ecat_data_i    (ecat_data_i),
    .ecat_data_o    (ecat_data_o),
    .cgra_enable_i  (cgra_enable_i),
    .cgra_we_i      (cgra_we_i),
    .cgra_address_i (cgra_address_i),
    .cgra_data_i    (cgra_data_i),
    .cgra_data_o    (cgra_data_o),
    .conflict_o     (cgra_conflict_o),
    .buffer_full_o  (cgra_buffer_full_o),
    .lost_o         (cgra_lost_o)
  );

endmodule
