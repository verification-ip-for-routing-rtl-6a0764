// Output port of the packet switch: packet buffer and ready/read handshake.
//
// Bytes routed to this port are written into a DEPTH-byte circular buffer,
// each stored with a flag marking the final byte of its packet. A packet
// becomes visible to the reader only once its final byte is stored (store
// and forward). If the buffer fills up while a packet is being written, the
// whole packet is discarded: the write pointer falls back to the end of the
// last complete packet, the rest of the packet is ignored, and drop_overflow
// pulses for one cycle. Packets already stored are never lost.
//
// Handshake: ready goes high when a complete packet is waiting. While ready
// is high, every clock edge at which read is sampled high moves the next
// byte of that packet onto port_data, where it stays until the next such
// edge; read may be lowered at any time to pause. The edge that delivers a
// packet's final byte also lowers ready, which stays low for at least one
// cycle, so each high period of ready carries exactly one packet. Reads
// while ready is low are ignored. Rate: one byte per clock.
//
// From the specification: the ready, read and data signals of each output
// port, ready raised by the switch when a packet can be sent, and data
// taken while both ready and read are high. This design's own choices: the
// buffer and its depth, store-and-forward, dropping whole packets on
// overflow, and ready falling with the final byte (which marks the packet
// boundary to the reader).
module output_port
  import switch_pkg::*;
#(
  parameter int unsigned DEPTH = switch_pkg::SW_QUEUE_DEPTH
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      wr,
  input  pkt_byte_t wr_byte,
  output logic      ready,
  input  logic      read,
  output byte_t     port_data,
  output logic      drop_overflow
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned PW = AW + 1;        // pointers carry a wrap bit

  typedef struct packed {
    logic  last;
    byte_t data;
  } entry_t;

  entry_t        mem [DEPTH];
  logic [PW-1:0] wr_ptr;      // next free entry (includes a packet in progress)
  logic [PW-1:0] commit_ptr;  // end of the last complete packet
  logic [PW-1:0] rd_ptr;      // next entry to hand out
  logic [PW-1:0] pkt_cnt;     // complete packets not yet fully read
  logic          dropping;    // rest of the current packet is discarded

  typedef enum logic {S_IDLE, S_SEND} rd_state_e;
  rd_state_e state;

  // ---- write side ----
  logic full, drop_byte, store, commit, pop, pop_last;
  assign full      = (wr_ptr - rd_ptr) == PW'(DEPTH);
  assign drop_byte = wr && ((dropping && !wr_byte.first) || full);
  assign store     = wr && !drop_byte;
  assign commit    = store && wr_byte.last;

  always_ff @(posedge clk) begin
    if (store) mem[wr_ptr[AW-1:0]] <= '{last: wr_byte.last, data: wr_byte.data};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr        <= '0;
      commit_ptr    <= '0;
      dropping      <= 1'b0;
      drop_overflow <= 1'b0;
    end else begin
      drop_overflow <= 1'b0;
      if (store) begin
        wr_ptr <= wr_ptr + 1'b1;
        if (wr_byte.first) dropping <= 1'b0;
        if (commit) commit_ptr <= wr_ptr + 1'b1;
      end else if (drop_byte) begin
        wr_ptr        <= commit_ptr;
        dropping      <= !wr_byte.last;
        drop_overflow <= !dropping || wr_byte.first;
      end
    end
  end

  // ---- read side ----
  assign ready    = (state == S_SEND);
  assign pop      = ready && read;
  assign pop_last = pop && mem[rd_ptr[AW-1:0]].last;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      rd_ptr    <= '0;
      port_data <= '0;
    end else begin
      case (state)
        S_IDLE: if (pkt_cnt != '0) state <= S_SEND;
        S_SEND: if (pop_last)      state <= S_IDLE;
        default:                   state <= S_IDLE;
      endcase
      if (pop) begin
        port_data <= mem[rd_ptr[AW-1:0]].data;
        rd_ptr    <= rd_ptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) pkt_cnt <= '0;
    else     pkt_cnt <= pkt_cnt + PW'(commit) - PW'(pop_last);
  end

  // ready is only offered for a packet that is wholly stored.
  a_ready_has_packet: assert property (@(posedge clk) disable iff (rst) ready |-> pkt_cnt != '0);
  // Reading never passes the committed data.
  a_no_underrun: assert property (@(posedge clk) disable iff (rst) pop |-> rd_ptr != commit_ptr);

endmodule
