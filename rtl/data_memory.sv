// Data memory of one CGRA processing element, shared with the EtherCAT master.
//
// A memory of 2**ADDR_W words of DATA_W bits with two access ports, one for
// the processing element (cgra_*) and one for the EtherCAT master (ecat_*).
// Both ports can read in the same cycle, and a read and a write on different
// ports never collide.  When both ports write in the same cycle, conflict_o
// is raised: the processing element's write goes to the memory, and the
// master's address and data are queued in a FIFO of BUF_DEPTH entries.  In
// a later cycle in which neither port writes, the oldest queued write is
// performed.  buffer_full_o is high while the FIFO is full; a master write
// that collides while the FIFO is full is lost and pulses lost_o.
//
// Reads are synchronous: the word appears on cgra_data_o / ecat_data_o one
// cycle after the enable, and is zero in a cycle following no access, so the
// master-side outputs of several memories can be combined with an OR.  A
// write returns the written word on the same port.  A read of a word whose
// write is still queued returns the old content.  The memory array has no
// reset; the pointers and outputs do.
//
// The collision rule, the priority of the processing element, the deferred
// master write through a buffer and the zero-when-unselected output follow
// the described interface, as does the buffer depth of three.  The write
// returning the written word and the lost-write flag are this design's
// choices.
module data_memory #(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned ADDR_W    = 8,
  parameter int unsigned BUF_DEPTH = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // processing element port
  input  logic              cgra_enable_i,
  input  logic              cgra_we_i,
  input  logic [ADDR_W-1:0] cgra_address_i,
  input  logic [DATA_W-1:0] cgra_data_i,
  output logic [DATA_W-1:0] cgra_data_o,
  // EtherCAT master port
  input  logic              ecat_enable_i,
  input  logic              ecat_we_i,
  input  logic [ADDR_W-1:0] ecat_address_i,
  input  logic [DATA_W-1:0] ecat_data_i,
  output logic [DATA_W-1:0] ecat_data_o,
  // status
  output logic              conflict_o,
  output logic              buffer_full_o,
  output logic              lost_o
);

  localparam int unsigned PW = (BUF_DEPTH > 1) ? $clog2(BUF_DEPTH) : 1;

  logic [DATA_W-1:0] mem [2**ADDR_W];

  logic [DATA_W-1:0] buf_data [BUF_DEPTH];
  logic [ADDR_W-1:0] buf_addr [BUF_DEPTH];
  logic [PW-1:0]     buf_rd, buf_wr;
  logic [PW:0]       buf_count;

  logic cgra_wr, ecat_wr, buf_push, buf_pop;

  assign cgra_wr       = cgra_enable_i && cgra_we_i;
  assign ecat_wr       = ecat_enable_i && ecat_we_i;
  assign conflict_o    = cgra_wr && ecat_wr;
  assign buffer_full_o = (buf_count == (PW+1)'(BUF_DEPTH));
  assign buf_push      = conflict_o && !buffer_full_o;
  assign buf_pop       = !cgra_wr && !ecat_wr && (buf_count != '0);

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(BUF_DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  // single write per cycle: processing element, then master, then buffer
  always_ff @(posedge clk) begin
    if (cgra_wr)
      mem[cgra_address_i] <= cgra_data_i;
    else if (ecat_wr)
      mem[ecat_address_i] <= ecat_data_i;
    else if (buf_pop)
      mem[buf_addr[buf_rd]] <= buf_data[buf_rd];
  end

  always_ff @(posedge clk) begin
    if (buf_push) begin
      buf_data[buf_wr] <= ecat_data_i;
      buf_addr[buf_wr] <= ecat_address_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_rd      <= '0;
      buf_wr      <= '0;
      buf_count   <= '0;
      lost_o      <= 1'b0;
      cgra_data_o <= '0;
      ecat_data_o <= '0;
    end else begin
      lost_o <= conflict_o && buffer_full_o;
      if (buf_push) buf_wr <= next_ptr(buf_wr);
      if (buf_pop)  buf_rd <= next_ptr(buf_rd);
      buf_count <= buf_count + (PW+1)'(buf_push) - (PW+1)'(buf_pop);

      if (!cgra_enable_i)  cgra_data_o <= '0;
      else if (cgra_we_i)  cgra_data_o <= cgra_data_i;
      else                 cgra_data_o <= mem[cgra_address_i];

      if (!ecat_enable_i)  ecat_data_o <= '0;
      else if (ecat_we_i)  ecat_data_o <= ecat_data_i;
      else                 ecat_data_o <= mem[ecat_address_i];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(buf_push && buf_pop))
    else $error("data_memory: push and pop in the same cycle");

endmodule
