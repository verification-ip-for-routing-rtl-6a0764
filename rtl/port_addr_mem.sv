// Port address table behind the switch's memory port.
//
// Holds one ADDR_W-bit address per output port. The input port compares
// the destination address of each arriving packet with these entries to
// pick the output port. While mem_en is high the port is accessed: with
// mem_rd_wr high, mem_data is written into the entry selected by mem_add
// (the port number); with mem_rd_wr low, the entry is read back on
// mem_rdata one clock later. mem_en low leaves the table unchanged.
//
// Timing: a write takes effect at the rising clock edge where it is
// sampled, so port_addr shows the new address from the next cycle on and
// packets whose destination byte arrives from then on are routed by it.
//
// From the specification: the four signals mem_en, mem_rd_wr, mem_add and
// mem_data, their meaning, the 8-bit addresses and the standard address table,
// which this design also loads at reset (port n = address n). This
// design's own choices: the polarity of mem_rd_wr (high = write), the
// separate read-back output mem_rdata, and the synchronous active-high
// reset.
module port_addr_mem
  import switch_pkg::*;
#(
  parameter int unsigned NUM_PORTS = switch_pkg::SW_PORTS,
  parameter int unsigned ADDR_W    = switch_pkg::BYTE_W
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         mem_en,
  input  logic                         mem_rd_wr,
  input  logic [$clog2(NUM_PORTS)-1:0] mem_add,
  input  logic [ADDR_W-1:0]            mem_data,
  output logic [ADDR_W-1:0]            mem_rdata,
  output logic [ADDR_W-1:0]            port_addr [NUM_PORTS]
);

  logic [ADDR_W-1:0] table_q [NUM_PORTS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned p = 0; p < NUM_PORTS; p++)
        table_q[p] <= ADDR_W'(p);
      mem_rdata <= '0;
    end else if (mem_en) begin
      if (mem_rd_wr)
        table_q[mem_add] <= mem_data;
      else
        mem_rdata <= table_q[mem_add];
    end
  end

  assign port_addr = table_q;

endmodule
