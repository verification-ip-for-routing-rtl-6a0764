// Input port of the packet switch: framing and routing.
//
// A packet arrives one byte per clock while data_status is high; the first
// byte is the destination address. When a packet's first byte is sampled it
// is compared with the address of every output port; the lowest-numbered
// port whose address matches is chosen for the whole packet. A packet whose
// destination matches no port is discarded and reported by a one-cycle
// pulse on drop_unmatched.
//
// The end of a packet is the falling edge of data_status, not the length
// field, so packets whose length field disagrees with their size are still
// forwarded whole, and the FCS byte is forwarded untouched (the switch does
// not check it). To mark the final byte, each byte is held one cycle until
// it is known whether another follows.
//
// Interface: q_wr[p] is a one-cycle write strobe to output queue p, with
// q_byte giving the byte and its first/last flags. Timing: a byte sampled at
// clock edge k leaves on q_byte at edge k+2 (two cycles of latency); the
// rate is one byte per clock.
//
// From the specification: the data_status/data signals, both active high;
// a packet framed by data_status; destination-address routing against the
// port address table. This design's own choices: at least one idle cycle
// (data_status low) between packets, lowest-port-wins for duplicated
// addresses, discarding unmatched packets, and the two-cycle latency.
module input_port
  import switch_pkg::*;
#(
  parameter int unsigned NUM_PORTS = switch_pkg::SW_PORTS
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      data_status,
  input  byte_t     data,
  input  byte_t     port_addr [NUM_PORTS],
  output logic      q_wr [NUM_PORTS],
  output pkt_byte_t q_byte,
  output logic      drop_unmatched
);

  localparam int unsigned SEL_W = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1;

  // Held byte, waiting to learn whether it is the last one of its packet.
  logic  hold_valid, hold_first;
  byte_t hold_data;
  logic  in_pkt;                 // a packet is being received
  logic  [SEL_W-1:0] sel_q;      // output port of the current packet
  logic  matched_q;              // the current packet has an output port

  // Destination lookup on the byte being sampled.
  logic             hit;
  logic [SEL_W-1:0] hit_port;
  always_comb begin
    hit      = 1'b0;
    hit_port = '0;
    for (int p = NUM_PORTS - 1; p >= 0; p--) begin
      if (port_addr[p] == data) begin
        hit      = 1'b1;
        hit_port = SEL_W'(p);
      end
    end
  end

  logic  emit;       // the held byte leaves this cycle edge
  logic  emit_last;
  assign emit      = hold_valid;
  assign emit_last = !data_status;

  always_ff @(posedge clk) begin
    if (rst) begin
      hold_valid     <= 1'b0;
      hold_first     <= 1'b0;
      hold_data      <= '0;
      in_pkt         <= 1'b0;
      sel_q          <= '0;
      matched_q      <= 1'b0;
      drop_unmatched <= 1'b0;
      q_byte         <= '0;
      for (int p = 0; p < NUM_PORTS; p++) q_wr[p] <= 1'b0;
    end else begin
      drop_unmatched <= 1'b0;

      // Stage 2: hand the held byte to the selected queue.
      for (int p = 0; p < NUM_PORTS; p++)
        q_wr[p] <= emit && matched_q && (sel_q == SEL_W'(p));
      if (emit) begin
        q_byte.data  <= hold_data;
        q_byte.first <= hold_first;
        q_byte.last  <= emit_last;
      end

      // Stage 1: sample the input port.
      if (data_status) begin
        hold_valid <= 1'b1;
        hold_data  <= data;
        hold_first <= !in_pkt;
        in_pkt     <= 1'b1;
        if (!in_pkt) begin
          sel_q          <= hit_port;
          matched_q      <= hit;
          drop_unmatched <= !hit;
        end
      end else begin
        hold_valid <= 1'b0;
        in_pkt     <= 1'b0;
      end
    end
  end

  // At most one queue is written per cycle.
  logic [NUM_PORTS-1:0] wr_vec;
  always_comb
    for (int p = 0; p < NUM_PORTS; p++) wr_vec[p] = q_wr[p];
  a_onehot_write: assert property (@(posedge clk) disable iff (rst) $onehot0(wr_vec));

endmodule
