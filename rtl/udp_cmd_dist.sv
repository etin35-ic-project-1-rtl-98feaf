// udp_cmd_dist: UDP command distribution of the SRU.
//
// Receives the UDP part of a command frame byte by byte (the 8-byte UDP
// header first, then the payload of Table 1) and fans the command bytes out
// to the 40 per-link DCS command decoders and the SRU CSR decoder.  All
// destinations see the same byte bus dcs_rxd; each has its own data-valid bit
// in dcs_rx_dv[40:0] (bit 40 = SRU, bits 39..0 = DTC links 39..0).
//
// Operation: a byte counter follows the frame.  Bytes 2-3 hold the UDP
// destination port, bytes 8-15 the two NodeSel words (NodeSel[40:20] in the
// low 21 bits of the first, NodeSel[19:0] in the low 20 bits of the second,
// big-endian).  The first 16 bytes are never forwarded.  From byte 16 on,
// dcs_rx_dv = NodeSel when the port matched, else 0.
// Timing: dcs_rxd and dcs_rx_dv are registered, one clock after udp_rxd, as
// in the design description.  The destination port value is a parameter
// chosen by this implementation.
module udp_cmd_dist #(
  parameter int unsigned  NNODE    = 41,
  parameter logic [15:0]  CMD_PORT = 16'd4660
) (
  input  logic             clk,        // 125 MHz Ethernet clock
  input  logic             rst,
  input  logic [7:0]       udp_rxd,
  input  logic             udp_rx_dv,
  output logic [7:0]       dcs_rxd,
  output logic [NNODE-1:0] dcs_rx_dv
);

  logic [15:0] byte_cnt;
  logic [15:0] dport;
  logic [40:0] nodesel;

  always_ff @(posedge clk) begin
    if (rst) begin
      byte_cnt  <= '0;
      dport     <= '0;
      nodesel   <= '0;
      dcs_rxd   <= '0;
      dcs_rx_dv <= '0;
    end else begin
      dcs_rxd   <= udp_rxd;
      dcs_rx_dv <= '0;
      if (udp_rx_dv) begin
        if (byte_cnt != 16'hFFFF) byte_cnt <= byte_cnt + 16'd1;
        case (byte_cnt)
          16'd2:  dport[15:8]     <= udp_rxd;
          16'd3:  dport[7:0]      <= udp_rxd;
          16'd9:  nodesel[40:36]  <= udp_rxd[4:0];
          16'd10: nodesel[35:28]  <= udp_rxd;
          16'd11: nodesel[27:20]  <= udp_rxd;
          16'd13: nodesel[19:16]  <= udp_rxd[3:0];
          16'd14: nodesel[15:8]   <= udp_rxd;
          16'd15: nodesel[7:0]    <= udp_rxd;
          default: ;
        endcase
        if (byte_cnt >= 16'd16 && dport == CMD_PORT)
          dcs_rx_dv <= nodesel[NNODE-1:0];
      end else begin
        byte_cnt <= '0;
      end
    end
  end

endmodule
