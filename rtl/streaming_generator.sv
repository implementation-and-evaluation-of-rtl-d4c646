// Streaming generator: the EtherCAT slave controller datapath of one node.
//
// Frames from the master arrive on port 0 as a byte stream (rx0_*), one byte
// every other clock cycle at the Gigabit line rate, and are processed on the
// fly, byte by byte, without buffering the frame:
//   * bytes 12 and 13 are checked against the EtherType 88A4; only EtherCAT
//     frames are processed, other frames pass unchanged;
//   * after the 2-byte EtherCAT header, datagrams follow one after another.
//     Each has a 10-byte header (command, index, 32-bit address made of a
//     16-bit slave address and a 16-bit offset, 11-bit length, flags,
//     interrupt), LEN data bytes and a 16-bit little-endian working counter.
//     Counters track the byte position inside the frame and inside the
//     current datagram, so a datagram may start at any byte;
//   * commands 5 to 9 (FPWR, FPRW, BRD, BWR, BRW) are served: broadcast ones
//     always, configured-address ones when the slave address equals
//     STATION_ADDR.  Data byte k of a served datagram addresses register
//     (offset + k) of a register file of REG_COUNT 8-bit registers, taken
//     modulo REG_COUNT.  A read replaces the byte in the frame with the
//     register, a write stores the frame byte (a read/write does both, the
//     frame carrying the old value onward), and the working counter is
//     raised by 1 for a read or a write and by 3 for a read/write.
// The processed stream is delayed by six bytes.  That delay lets the node
// that is last in the chain (is_last_i, from the link status of port 1)
// exchange the destination and source MAC addresses before it loops the
// frame back out of port 0.  A node that is not last sends the frame on
// out of port 1, addresses untouched, and passes frames coming back on port 1
// straight to port 0 without touching them.  is_last_i is sampled at the
// first byte of each frame.  The output streams (tx0_*, tx1_*) carry one
// byte per strobe, with tx*_last_o on the final byte.
//
// Following the described slave: EtherType check, per-datagram counters for
// unaligned datagrams, the 32-entry 8-bit register file with addresses
// incremented per byte, the served commands and their working-counter
// increments, address swap only in the last node, loop-back versus
// forwarding by link status.  This design's own choices: a byte-wide
// stream instead of 32-bit words, datagrams parsed until the end of the
// frame (the EtherCAT length field and the "more datagrams" flag are not
// used), registers reset to zero, register addresses wrapping modulo
// REG_COUNT, read data replacing (not ORed into) the frame data, and the
// working counter updated as a 16-bit little-endian number.
module streaming_generator
  import ecat_pkg::*;
#(
  parameter int unsigned REG_COUNT    = 32,
  parameter logic [15:0] STATION_ADDR = 16'h0000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       is_last_i,      // this node ends the chain
  // port 0, from the master side
  input  logic       rx0_valid_i,
  input  logic [7:0] rx0_data_i,
  input  logic       rx0_sof_i,
  input  logic       rx0_last_i,
  // port 1, from the next node
  input  logic       rx1_valid_i,
  input  logic [7:0] rx1_data_i,
  input  logic       rx1_last_i,
  // port 0, towards the master
  output logic       tx0_valid_o,
  output logic [7:0] tx0_data_o,
  output logic       tx0_last_o,
  // port 1, towards the next node
  output logic       tx1_valid_o,
  output logic [7:0] tx1_data_o,
  output logic       tx1_last_o,
  // one-cycle event strobes
  output logic       ecat_frame_o,   // an EtherCAT frame was recognised
  output logic       dgram_served_o  // a datagram addressed this slave
);

  localparam int unsigned RAW   = $clog2(REG_COUNT);
  localparam int unsigned DELAY = 6;   // bytes, one MAC address

  // ---------------------------------------------------------- register file
  logic [7:0] regs [REG_COUNT];

  // ------------------------------------------------------------- parsing
  logic [10:0] pos;          // byte index in the frame
  logic        is_ecat;
  logic [7:0]  type_hi;
  logic [11:0] dg_pos;       // byte index in the datagram
  logic [7:0]  dg_cmd;
  logic [15:0] dg_adp;
  logic [15:0] dg_ado;
  logic [10:0] dg_len;
  logic        wkc_carry;
  logic        swap_q;
  logic        swap_now;

  cmd_action_t act;
  logic        served;
  logic        in_dgram;     // current byte belongs to the datagram area
  logic        is_data, is_wkc_lo, is_wkc_hi;
  logic [RAW-1:0] reg_addr;
  logic [7:0]  out_byte;     // processed byte
  logic [11:0] data_end;
  logic [10:0] in_pos;       // index of the byte now on rx0

  assign in_pos = rx0_sof_i ? 11'd0 : pos;

  assign act       = decode_cmd(dg_cmd);
  assign served    = (act.rd || act.wr) && (act.bcast || dg_adp == STATION_ADDR);
  assign in_dgram  = is_ecat && !rx0_sof_i && pos >= 11'(ETH_HDR_BYTES + ECAT_HDR_BYTES);
  assign data_end  = 12'(DGRAM_HDR_BYTES) + 12'(dg_len);
  assign is_data   = in_dgram && dg_pos >= 12'(DGRAM_HDR_BYTES) && dg_pos < data_end;
  assign is_wkc_lo = in_dgram && dg_pos >= 12'(DGRAM_HDR_BYTES) && dg_pos == data_end;
  assign is_wkc_hi = in_dgram && dg_pos >= 12'(DGRAM_HDR_BYTES) && dg_pos == data_end + 12'd1;
  assign reg_addr  = RAW'(dg_ado + 16'(dg_pos - 12'(DGRAM_HDR_BYTES)));

  // the frame's first byte decides loop-back for the whole frame
  assign swap_now = rx0_sof_i ? is_last_i : swap_q;

  always_comb begin
    logic [8:0] sum;
    out_byte = rx0_data_i;
    sum      = '0;
    if (is_data && served && act.rd)
      out_byte = regs[reg_addr];
    if (is_wkc_lo && served) begin
      sum      = {1'b0, rx0_data_i} + {7'd0, act.wkc};
      out_byte = sum[7:0];
    end
    if (is_wkc_hi)
      out_byte = rx0_data_i + {7'd0, wkc_carry};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < REG_COUNT; i++) regs[i] <= '0;
    end else if (rx0_valid_i && is_data && served && act.wr) begin
      regs[reg_addr] <= rx0_data_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      is_ecat   <= 1'b0;
      type_hi   <= '0;
      dg_pos    <= '0;
      dg_cmd    <= '0;
      dg_adp    <= '0;
      dg_ado    <= '0;
      dg_len    <= '0;
      wkc_carry <= 1'b0;
      swap_q    <= 1'b0;
      ecat_frame_o   <= 1'b0;
      dgram_served_o <= 1'b0;
    end else begin
      ecat_frame_o   <= 1'b0;
      dgram_served_o <= 1'b0;
      if (rx0_valid_i) begin
        pos <= (in_pos == '1) ? in_pos : in_pos + 11'd1;
        if (rx0_sof_i) begin
          swap_q  <= is_last_i;
          is_ecat <= 1'b0;
          dg_pos  <= '0;
        end
        if (in_pos == 11'd12) type_hi <= rx0_data_i;
        if (in_pos == 11'd13) begin
          is_ecat      <= {type_hi, rx0_data_i} == ETHERTYPE_ECAT;
          ecat_frame_o <= {type_hi, rx0_data_i} == ETHERTYPE_ECAT;
        end
        if (in_dgram && !rx0_sof_i) begin
          unique case (dg_pos)
            12'd0: dg_cmd        <= rx0_data_i;
            12'd2: dg_adp[7:0]   <= rx0_data_i;
            12'd3: dg_adp[15:8]  <= rx0_data_i;
            12'd4: dg_ado[7:0]   <= rx0_data_i;
            12'd5: dg_ado[15:8]  <= rx0_data_i;
            12'd6: dg_len[7:0]   <= rx0_data_i;
            12'd7: dg_len[10:8]  <= rx0_data_i[2:0];
            default: ;
          endcase
          if (is_wkc_lo) begin
            wkc_carry      <= served && ({1'b0, rx0_data_i} + {7'd0, act.wkc} > 9'd255);
            dgram_served_o <= served;
          end
          dg_pos <= is_wkc_hi ? 12'd0 : dg_pos + 12'd1;
        end
      end
    end
  end

  // ------------------------------------------------- six-byte delay and swap
  logic [7:0]  dly [DELAY];     // [0] newest
  logic [7:0]  dst_save [DELAY];
  logic [2:0]  fill;            // bytes held in dly
  logic [10:0] out_idx;
  logic        flushing;
  logic        p_valid, p_last;
  logic [7:0]  p_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DELAY; i++) begin
        dly[i]      <= '0;
        dst_save[i] <= '0;
      end
      fill     <= '0;
      out_idx  <= '0;
      flushing <= 1'b0;
      p_valid  <= 1'b0;
      p_data   <= '0;
      p_last   <= 1'b0;
    end else begin
      p_valid <= 1'b0;
      p_last  <= 1'b0;
      if (rx0_valid_i) begin
        if (rx0_sof_i) out_idx <= '0;
        if (in_pos < 11'(DELAY)) dst_save[in_pos[2:0]] <= rx0_data_i;
        dly[0] <= out_byte;
        for (int i = 1; i < DELAY; i++) dly[i] <= dly[i-1];
        if (in_pos >= 11'(DELAY)) begin
          // emit the byte DELAY positions back
          p_valid <= 1'b1;
          out_idx <= (rx0_sof_i ? 11'd0 : out_idx) + 11'd1;
          if (swap_now && out_idx < 11'(DELAY))
            p_data <= rx0_data_i;                          // source -> destination
          else if (swap_now && out_idx < 11'(2*DELAY))
            p_data <= dst_save[out_idx[2:0] - 3'(DELAY)];  // destination -> source
          else
            p_data <= dly[DELAY-1];
          fill <= 3'(DELAY);
        end else begin
          fill <= rx0_sof_i ? 3'd1 : fill + 3'd1;
        end
        flushing <= rx0_last_i;
      end else if (flushing) begin
        p_valid <= 1'b1;
        if (swap_q && out_idx >= 11'(DELAY) && out_idx < 11'(2*DELAY))
          p_data <= dst_save[out_idx[2:0] - 3'(DELAY)];
        else
          p_data <= dly[fill-1];
        p_last  <= (fill == 3'd1);
        out_idx <= out_idx + 11'd1;
        fill    <= fill - 3'd1;
        if (fill == 3'd1) flushing <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------- routing
  // Port 1 carries processed frames of a node that is not last.  Port 0
  // carries looped-back frames of the last node and, otherwise, whatever
  // comes back on port 1; a looped-back byte takes precedence (the last
  // node has no link on port 1, so nothing should arrive there).
  always_comb begin
    tx1_valid_o = p_valid && !swap_q;
    tx1_data_o  = p_data;
    tx1_last_o  = p_last && !swap_q;
    if (p_valid && swap_q) begin
      tx0_valid_o = 1'b1;
      tx0_data_o  = p_data;
      tx0_last_o  = p_last;
    end else begin
      tx0_valid_o = rx1_valid_i;
      tx0_data_o  = rx1_data_i;
      tx0_last_o  = rx1_last_i;
    end
  end

  // A new frame must not start before the previous one has been flushed.
  assert property (@(posedge clk) disable iff (!rst_n)
    rx0_valid_i |-> !flushing)
    else $error("streaming_generator: frame started during flush");

endmodule
