// Packet switch with one input port, four output ports and a memory port.
//
// Packets (destination address, source address, length, data bytes, FCS)
// enter one byte per clock on data while data_status is high. The memory
// port fills a table with the address of each output port; each packet is
// sent to the output port whose address equals its destination byte, and
// is discarded if there is none (drop_unmatched pulses). Every output port
// buffers whole packets and hands them out under its own ready/read
// handshake; a packet that does not fit in a full buffer is discarded
// (drop_overflow[p] pulses). Packets are forwarded unchanged, FCS included.
//
// Structure: port_addr_mem (the memory port) -> input_port (framing and
// destination lookup) -> NUM_PORTS x output_port (buffer and handshake).
//
// Timing: a byte sampled on the input at clock edge k is written into its
// output buffer at edge k+2. If the edge that samples a packet's last byte
// is k and the output port is idle, ready rises at edge k+3. Each port then
// delivers one byte per clock while read is held high. All state is reset
// synchronously by an active-high reset.
//
// From the specification: the port list of its block diagram (input port, memory
// port, output ports 0-3, clock, reset), the signal names and meanings of
// each port, and the packet format. The internal split, the buffering and
// the discard rules are this design's own.
module switch_top
  import switch_pkg::*;
#(
  parameter int unsigned NUM_PORTS   = switch_pkg::SW_PORTS,
  parameter int unsigned QUEUE_DEPTH = switch_pkg::SW_QUEUE_DEPTH
) (
  input  logic                         clk,
  input  logic                         reset,
  // memory port
  input  logic                         mem_en,
  input  logic                         mem_rd_wr,
  input  logic [$clog2(NUM_PORTS)-1:0] mem_add,
  input  byte_t                        mem_data,
  output byte_t                        mem_rdata,
  // input port
  input  logic                         data_status,
  input  byte_t                        data,
  // output ports
  output logic [NUM_PORTS-1:0]         ready,
  input  logic [NUM_PORTS-1:0]         read,
  output byte_t                        port_data [NUM_PORTS],
  // status
  output logic                         drop_unmatched,
  output logic [NUM_PORTS-1:0]         drop_overflow
);

  byte_t     port_addr [NUM_PORTS];
  logic      q_wr      [NUM_PORTS];
  pkt_byte_t q_byte;

  port_addr_mem #(
    .NUM_PORTS (NUM_PORTS),
    .ADDR_W    (BYTE_W)
  ) u_mem (
    .clk       (clk),
    .rst       (reset),
    .mem_en    (mem_en),
    .mem_rd_wr (mem_rd_wr),
    .mem_add   (mem_add),
    .mem_data  (mem_data),
    .mem_rdata (mem_rdata),
    .port_addr (port_addr)
  );

  input_port #(
    .NUM_PORTS (NUM_PORTS)
  ) u_in (
    .clk            (clk),
    .rst            (reset),
    .data_status    (data_status),
    .data           (data),
    .port_addr      (port_addr),
    .q_wr           (q_wr),
    .q_byte         (q_byte),
    .drop_unmatched (drop_unmatched)
  );

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_out
    output_port #(
      .DEPTH (QUEUE_DEPTH)
    ) u_out (
      .clk           (clk),
      .rst           (reset),
      .wr            (q_wr[p]),
      .wr_byte       (q_byte),
      .ready         (ready[p]),
      .read          (read[p]),
      .port_data     (port_data[p]),
      .drop_overflow (drop_overflow[p])
    );
  end

endmodule
