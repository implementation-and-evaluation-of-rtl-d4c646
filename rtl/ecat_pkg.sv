// Shared constants and types of the EtherCAT slave node.
//
// Holds the Ethernet and EtherCAT frame constants (EtherType, preamble and
// start-of-frame delimiter, the CRC-32 generator polynomial), the EtherCAT
// command codes the slave processes, and the working-counter increment that
// each of those commands earns when it is served.  The command set (codes 5
// to 9) and the increments (read +1, write +1, read/write +3) follow the
// slave described here; the code values themselves are the standard EtherCAT
// assignments.
package ecat_pkg;

  // EtherType of an EtherCAT frame (bytes 12 and 13 of the Ethernet header).
  localparam logic [15:0] ETHERTYPE_ECAT = 16'h88A4;

  // Preamble byte and start-of-frame delimiter, as bytes on the wire.
  localparam logic [7:0]  ETH_PREAMBLE = 8'h55;
  localparam logic [7:0]  ETH_SFD      = 8'hD5;

  // IEEE 802.3 CRC-32 generator polynomial, x^32 omitted, normal notation.
  localparam logic [31:0] ETH_CRC_POLY = 32'h04C1_1DB7;
  // Residue left in the (reflected, non-inverted) CRC register after a frame
  // plus its own correct FCS has been run through it.
  localparam logic [31:0] ETH_CRC_RESIDUE = 32'hDEBB_20E3;

  // Byte positions inside an Ethernet frame (preamble and SFD stripped).
  localparam int unsigned ETH_HDR_BYTES  = 14;  // dst(6) src(6) type(2)
  localparam int unsigned ECAT_HDR_BYTES = 2;   // length(11) res(1) type(4)
  localparam int unsigned DGRAM_HDR_BYTES = 10; // cmd idx adr(4) len(2) irq(2)
  localparam int unsigned DGRAM_WKC_BYTES = 2;

  // EtherCAT commands served by this slave.
  typedef enum logic [7:0] {
    CMD_FPWR = 8'd5,   // configured-address write
    CMD_FPRW = 8'd6,   // configured-address read/write
    CMD_BRD  = 8'd7,   // broadcast read
    CMD_BWR  = 8'd8,   // broadcast write
    CMD_BRW  = 8'd9    // broadcast read/write
  } ecat_cmd_e;

  // What a served command does to the register file.
  typedef struct packed {
    logic rd;        // returns register contents in the datagram data
    logic wr;        // stores datagram data in the register file
    logic bcast;     // addressed to every slave
    logic [1:0] wkc; // working-counter increment when served
  } cmd_action_t;

  function automatic cmd_action_t decode_cmd(input logic [7:0] cmd);
    cmd_action_t a;
    a = '0;
    unique case (cmd)
      CMD_FPWR: a = '{rd: 1'b0, wr: 1'b1, bcast: 1'b0, wkc: 2'd1};
      CMD_FPRW: a = '{rd: 1'b1, wr: 1'b1, bcast: 1'b0, wkc: 2'd3};
      CMD_BRD:  a = '{rd: 1'b1, wr: 1'b0, bcast: 1'b1, wkc: 2'd1};
      CMD_BWR:  a = '{rd: 1'b0, wr: 1'b1, bcast: 1'b1, wkc: 2'd1};
      CMD_BRW:  a = '{rd: 1'b1, wr: 1'b1, bcast: 1'b1, wkc: 2'd3};
      default:  a = '0;
    endcase
    return a;
  endfunction

endpackage
