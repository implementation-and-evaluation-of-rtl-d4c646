// Memory space an EtherCAT slave shares with a CGRA (coarse-grained
// reconfigurable array).
//
// The EtherCAT master sees one 32-bit address: bits 31..24 select the slave
// (SLAVE_ID), bits 23..16 select a processing element (PE), bits 15..0 the
// word inside the slave.  Offsets 0 .. CONFIG_MAX hold the configuration
// memory, a single-port memory that only the master can reach.  Offsets
// above CONFIG_MAX address the data memory of the selected PE, at word
// (offset - CONFIG_MAX); offsets beyond that memory, PEs beyond NUM_PE and
// other slave IDs are ignored.  Each PE has a private data_memory of
// 2**DATA_AW words, generated NUM_PE times, that it reaches through its own
// slice of the cgra_* buses with a local address that carries no offset; all
// PEs can access their memories in parallel.  Collisions between a PE and the
// master on one memory are resolved inside data_memory (PE first, master
// write queued).
//
// Read data for the master comes from the configuration memory or the
// selected data memory one cycle after the request; the unselected memories
// output zero and all outputs are ORed together.  The PE buses are flat:
// PE i uses bits [i*W +: W] of each.
//
// Following the described interface: the address split, the separate
// configuration memory, one generated data memory per PE, PE-local
// addressing, the OR of the outputs, and the defaults (three PEs, 32-bit
// words, 8-bit PE addresses, CONFIG_MAX = 255 so offset 257 is data word 2).
// This design's own choices: ignoring out-of-range accesses and the
// one-cycle read latency of the configuration memory.
module cgra_interface #(
  parameter int unsigned NUM_PE     = 3,
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned DATA_AW    = 8,
  parameter int unsigned CONFIG_MAX = 255,
  parameter int unsigned BUF_DEPTH  = 3,
  parameter logic [7:0]  SLAVE_ID   = 8'd0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // EtherCAT master side
  input  logic                      ecat_enable_i,
  input  logic                      ecat_we_i,
  input  logic [31:0]               ecat_address_i,
  input  logic [DATA_W-1:0]         ecat_data_i,
  output logic [DATA_W-1:0]         ecat_data_o,
  // CGRA side, one slice per PE
  input  logic [NUM_PE-1:0]         cgra_enable_i,
  input  logic [NUM_PE-1:0]         cgra_we_i,
  input  logic [NUM_PE*DATA_AW-1:0] cgra_address_i,
  input  logic [NUM_PE*DATA_W-1:0]  cgra_data_i,
  output logic [NUM_PE*DATA_W-1:0]  cgra_data_o,
  // status per PE memory
  output logic [NUM_PE-1:0]         conflict_o,
  output logic [NUM_PE-1:0]         buffer_full_o,
  output logic [NUM_PE-1:0]         lost_o
);

  localparam int unsigned CFG_WORDS = CONFIG_MAX + 1;
  localparam int unsigned CAW       = $clog2(CFG_WORDS);

  logic        slave_hit, cfg_sel;
  logic [7:0]  pe_sel;
  logic [15:0] offset, data_off;
  logic        data_in_range;
  logic [NUM_PE-1:0] ecat_enable_s;
  logic [DATA_W-1:0] ecat_data_s [NUM_PE];
  logic [DATA_W-1:0] cfg_data_q;

  assign slave_hit     = ecat_address_i[31:24] == SLAVE_ID;
  assign pe_sel        = ecat_address_i[23:16];
  assign offset        = ecat_address_i[15:0];
  assign cfg_sel       = ecat_enable_i && slave_hit && (32'(offset) <= CONFIG_MAX);
  assign data_off      = offset - 16'(CONFIG_MAX);
  assign data_in_range = (32'(offset) > CONFIG_MAX) && (32'(data_off) < 2**DATA_AW);

  always_comb begin
    for (int i = 0; i < NUM_PE; i++)
      ecat_enable_s[i] = ecat_enable_i && slave_hit && data_in_range && (32'(pe_sel) == i);
  end

  // configuration memory: master only
  logic [DATA_W-1:0] cfg_mem [CFG_WORDS];

  always_ff @(posedge clk) begin
    if (cfg_sel && ecat_we_i) cfg_mem[offset[CAW-1:0]] <= ecat_data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cfg_data_q <= '0;
    else if (!cfg_sel)   cfg_data_q <= '0;
    else if (ecat_we_i)  cfg_data_q <= ecat_data_i;
    else                 cfg_data_q <= cfg_mem[offset[CAW-1:0]];
  end

  // one data memory per processing element
  for (genvar g = 0; g < NUM_PE; g++) begin : g_pe
    data_memory #(
      .DATA_W    (DATA_W),
      .ADDR_W    (DATA_AW),
      .BUF_DEPTH (BUF_DEPTH)
    ) u_mem (
      .clk            (clk),
      .rst_n          (rst_n),
      .cgra_enable_i  (cgra_enable_i[g]),
      .cgra_we_i      (cgra_we_i[g]),
      .cgra_address_i (cgra_address_i[g*DATA_AW +: DATA_AW]),
      .cgra_data_i    (cgra_data_i[g*DATA_W +: DATA_W]),
      .cgra_data_o    (cgra_data_o[g*DATA_W +: DATA_W]),
      .ecat_enable_i  (ecat_enable_s[g]),
      .ecat_we_i      (ecat_we_i),
      .ecat_address_i (data_off[DATA_AW-1:0]),
      .ecat_data_i    (ecat_data_i),
      .ecat_data_o    (ecat_data_s[g]),
      .conflict_o     (conflict_o[g]),
      .buffer_full_o  (buffer_full_o[g]),
      .lost_o         (lost_o[g])
    );
  end

  // OR of all memory outputs towards the master
  always_comb begin
    ecat_data_o = cfg_data_q;
    for (int i = 0; i < NUM_PE; i++) ecat_data_o = ecat_data_o | ecat_data_s[i];
  end

endmodule
