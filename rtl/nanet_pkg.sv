// nanet_pkg: types and constants shared by the NaNet NIC modules.
//
// Inside the NIC every channel speaks one packet format, here called the
// APElink packet: one 32-bit header word followed by the payload words. The
// header carries the router destination port, the source port, a channel
// (stream/slot) number and the payload length in 32-bit words. The field
// layout and the 32-bit word width are this design's choice; the packet
// format of the original APElink protocol is defined elsewhere.
package nanet_pkg;

  localparam int unsigned WORD_W = 32;

  typedef logic [WORD_W-1:0] word_t;

  // APElink packet header word.
  typedef struct packed {
    logic [3:0]  dest;     // router output port
    logic [3:0]  src;      // router input port the packet entered from
    logic [7:0]  chan;     // stream number (UDP port offset or TDM slot)
    logic [15:0] len;      // payload length in 32-bit words
  } apl_hdr_t;

  // Special 8b/10b characters (byte values with the K flag set).
  localparam logic [7:0] K28_5 = 8'hBC;  // comma, frame start

  // 10-bit K28.5 code group, transmission order a..j held in bits 9..0.
  localparam logic [9:0] K28_5_RDN = 10'b0011111010;
  localparam logic [9:0] K28_5_RDP = 10'b1100000101;

endpackage
