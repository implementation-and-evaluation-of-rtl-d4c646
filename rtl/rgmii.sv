// RGMII receiver and transmitter for one Gigabit Ethernet port.
//
// The PHY moves one nibble per clock edge at 125 MHz.  This block runs on a
// 250 MHz clock (clk) and handles one nibble per cycle, so both clock edges
// of the RGMII interface are covered by consecutive clk cycles; the I/O
// double-data-rate registers and the clock skew are left to the pins.  Low
// nibble first, as RGMII specifies.
//
// Receive: the last nibble is kept, and the pair 5 followed by D with
// rgmii_rx_ctl high marks the start-of-frame delimiter.  Every following
// nibble enters a 9-entry (45-bit) shift buffer together with a valid bit;
// the oldest entry leaves the buffer each cycle.  When rgmii_rx_ctl falls, the
// valid bits of the eight newest entries are cleared: those are the frame
// check sequence, which the frame processor does not need, so it never
// leaves the block.  The nibbles are then paired into bytes: rx_valid_o
// strobes one byte every two cycles, rx_sof_o marks the first byte and
// rx_last_o the last one.  The FCS is removed but not checked.
//
// Transmit: bytes from the frame processor (tx_valid_i, tx_data_i, tx_last_i)
// enter a FIFO of TX_FIFO_DEPTH bytes.  As soon as it is not empty the
// transmitter sends the preamble (fifteen 5 nibbles and a D), then the
// bytes, feeding each through the CRC-32 step, then the four FCS bytes, and
// keeps an inter-frame gap of 12 byte times before the next frame.  The FIFO
// absorbs the 8 byte times of preamble, so a producer that keeps the line
// rate never runs it dry; tx_underrun_o pulses if it does.  rgmii_txc is the
// 125 MHz transmit clock, made by halving clk.
//
// Following the described design: SFD detection on the last two nibbles,
// the 45-bit FCS-removal buffer, CRC on transmitted data only, the 250 MHz
// logic clock.  This design's own choices: byte-wide interface to the frame
// processor, the transmit FIFO and its depth, the inter-frame gap, sampling
// the receive side in the local clock domain.
module rgmii
  import ecat_pkg::*;
#(
  parameter int unsigned TX_FIFO_DEPTH = 32,
  parameter int unsigned IFG_BYTES     = 12
) (
  input  logic       clk,          // 250 MHz, one nibble per cycle
  input  logic       rst_n,
  // PHY side
  input  logic [3:0] rgmii_rxd,
  input  logic       rgmii_rx_ctl,
  output logic [3:0] rgmii_txd,
  output logic       rgmii_tx_ctl,
  output logic       rgmii_txc,
  // frame processor side, receive
  output logic       rx_valid_o,
  output logic [7:0] rx_data_o,
  output logic       rx_sof_o,
  output logic       rx_last_o,
  // frame processor side, transmit
  input  logic       tx_valid_i,
  input  logic [7:0] tx_data_i,
  input  logic       tx_last_i,
  output logic       tx_busy_o,
  output logic       tx_underrun_o
);

  // ------------------------------------------------------------------ RX
  typedef struct packed {
    logic       v;
    logic [3:0] nib;
  } nib_t;

  nib_t [8:0] fcs_buf;          // [0] newest
  logic [3:0] last_nib;
  logic       last_ctl;
  logic       in_frame;
  logic       sfd_seen;
  logic       rx_end;
  nib_t       out_nib;
  logic       out_last;
  logic       hi_phase;
  logic [3:0] lo_nib;
  logic       first_byte;

  assign sfd_seen = !in_frame && rgmii_rx_ctl && last_ctl &&
                    last_nib == ETH_SFD[3:0] && rgmii_rxd == ETH_SFD[7:4];
  assign rx_end   = in_frame && last_ctl && !rgmii_rx_ctl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcs_buf  <= '0;
      last_nib <= '0;
      last_ctl <= 1'b0;
      in_frame <= 1'b0;
      out_nib  <= '0;
      out_last <= 1'b0;
    end else begin
      last_nib <= rgmii_rxd;
      last_ctl <= rgmii_rx_ctl;
      if (sfd_seen) in_frame <= 1'b1;
      else if (rx_end) in_frame <= 1'b0;

      fcs_buf[0] <= '{v: in_frame && rgmii_rx_ctl, nib: rgmii_rxd};
      for (int i = 1; i < 9; i++) begin
        fcs_buf[i].nib <= fcs_buf[i-1].nib;
        fcs_buf[i].v   <= fcs_buf[i-1].v && !rx_end;
      end
      out_nib  <= fcs_buf[8];
      out_last <= fcs_buf[8].v && !(fcs_buf[7].v && !rx_end);
    end
  end

  // nibble pairs to bytes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi_phase   <= 1'b0;
      lo_nib     <= '0;
      first_byte <= 1'b1;
      rx_valid_o <= 1'b0;
      rx_data_o  <= '0;
      rx_sof_o   <= 1'b0;
      rx_last_o  <= 1'b0;
    end else begin
      rx_valid_o <= 1'b0;
      rx_sof_o   <= 1'b0;
      rx_last_o  <= 1'b0;
      if (sfd_seen) begin
        hi_phase   <= 1'b0;
        first_byte <= 1'b1;
      end
      if (out_nib.v) begin
        if (!hi_phase) begin
          lo_nib   <= out_nib.nib;
          hi_phase <= 1'b1;
        end else begin
          hi_phase   <= 1'b0;
          rx_valid_o <= 1'b1;
          rx_data_o  <= {out_nib.nib, lo_nib};
          rx_sof_o   <= first_byte;
          rx_last_o  <= out_last;
          first_byte <= out_last;
        end
      end
    end
  end

  // ------------------------------------------------------------------ TX
  localparam int unsigned FAW = $clog2(TX_FIFO_DEPTH);

  typedef enum logic [2:0] {TX_IDLE, TX_PRE, TX_DATA, TX_FCS, TX_GAP} tx_state_e;

  tx_state_e   tx_state;
  logic [8:0]  fifo_mem [TX_FIFO_DEPTH];   // {last, data}
  logic [FAW:0] wr_ptr, rd_ptr;
  logic        fifo_empty;
  logic [8:0]  fifo_head;
  logic [5:0]  tx_cnt;
  logic        tx_hi;
  logic [31:0] crc_q, crc_next;
  logic [31:0] fcs;

  assign fifo_empty = (wr_ptr == rd_ptr);
  assign fifo_head  = fifo_mem[rd_ptr[FAW-1:0]];
  assign fcs        = ~crc_q;
  assign tx_busy_o  = (tx_state != TX_IDLE);

  crc32_step u_crc (
    .poly_i (ETH_CRC_POLY),
    .data_i (fifo_head[7:0]),
    .crc_i  (crc_q),
    .crc_o  (crc_next)
  );

  always_ff @(posedge clk) begin
    if (tx_valid_i) fifo_mem[wr_ptr[FAW-1:0]] <= {tx_last_i, tx_data_i};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr        <= '0;
      rd_ptr        <= '0;
      tx_state      <= TX_IDLE;
      tx_cnt        <= '0;
      tx_hi         <= 1'b0;
      crc_q         <= '1;
      rgmii_txd     <= '0;
      rgmii_tx_ctl  <= 1'b0;
      rgmii_txc     <= 1'b0;
      tx_underrun_o <= 1'b0;
    end else begin
      rgmii_txc     <= ~rgmii_txc;
      tx_underrun_o <= 1'b0;
      if (tx_valid_i) wr_ptr <= wr_ptr + 1'b1;
      unique case (tx_state)
        TX_IDLE: begin
          rgmii_tx_ctl <= 1'b0;
          rgmii_txd    <= '0;
          if (!fifo_empty) begin
            tx_state <= TX_PRE;
            tx_cnt   <= '0;
          end
        end
        TX_PRE: begin
          rgmii_tx_ctl <= 1'b1;
          rgmii_txd    <= (tx_cnt == 6'd15) ? ETH_SFD[7:4] : ETH_PREAMBLE[3:0];
          tx_cnt       <= tx_cnt + 1'b1;
          if (tx_cnt == 6'd15) begin
            tx_state <= TX_DATA;
            tx_hi    <= 1'b0;
            crc_q    <= '1;
          end
        end
        TX_DATA: begin
          if (fifo_empty) begin
            // producer fell behind the line rate
            rgmii_tx_ctl  <= 1'b0;
            tx_underrun_o <= 1'b1;
          end else begin
            rgmii_tx_ctl <= 1'b1;
            if (!tx_hi) begin
              rgmii_txd <= fifo_head[3:0];
              tx_hi     <= 1'b1;
            end else begin
              rgmii_txd <= fifo_head[7:4];
              tx_hi     <= 1'b0;
              crc_q     <= crc_next;
              rd_ptr    <= rd_ptr + 1'b1;
              if (fifo_head[8]) begin
                tx_state <= TX_FCS;
                tx_cnt   <= '0;
              end
            end
          end
        end
        TX_FCS: begin
          rgmii_tx_ctl <= 1'b1;
          rgmii_txd    <= fcs[tx_cnt[2:0]*4 +: 4];
          tx_cnt       <= tx_cnt + 1'b1;
          if (tx_cnt == 6'd7) begin
            tx_state <= TX_GAP;
            tx_cnt   <= '0;
          end
        end
        TX_GAP: begin
          rgmii_tx_ctl <= 1'b0;
          rgmii_txd    <= '0;
          tx_cnt       <= tx_cnt + 1'b1;
          if (tx_cnt == 6'(2*IFG_BYTES - 1)) tx_state <= TX_IDLE;
        end
        default: tx_state <= TX_IDLE;
      endcase
    end
  end

  // The FIFO must never be written while full.
  assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid_i |-> (wr_ptr - rd_ptr) < (FAW+1)'(TX_FIFO_DEPTH))
    else $error("rgmii: transmit FIFO overflow");

endmodule
