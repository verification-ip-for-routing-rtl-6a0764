// Self-checking testbench for output_port, the per-port packet buffer with
// its ready/read handshake. It runs with a 64-byte buffer.
//
// Phase 1 streams random packets in while a reader with a random read
// pattern drains them; the writer never sends more than fits, so every
// packet must come out whole, in order, with ready high for exactly the
// bytes of one packet and low for at least a cycle between packets.
// Phase 2 stops the reader and writes packets until the buffer overflows:
// packets that do not fit must be dropped whole (one drop_overflow pulse
// each) and the ones that fit, including a small one sent after a drop,
// must come out intact. Phase 3 measures the latency from the final byte's
// write to ready: ready is high one clock after the edge that stores it.
module tb_output_port;
  import switch_pkg::*;

  localparam int unsigned DEPTH = 64;

  logic      clk = 1'b0;
  logic      rst;
  logic      wr;
  pkt_byte_t wr_byte;
  logic      ready;
  logic      read;
  byte_t     port_data;
  logic      drop_overflow;

  int checks = 0, failures = 0;

  output_port #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  typedef byte_t bytes_q[$];
  bytes_q expected[$];       // packets that must come out, in order
  bytes_q cur;               // packet being read
  int     outstanding = 0;   // bytes written and not yet read
  int     n_read_pkts = 0, n_drops = 0;
  bit     reader_on = 0;
  bit     got_byte = 0;      // the last edge moved a byte onto port_data
  bit     ready_prev = 0;

  // Reader: drives read with a random pattern; checks each byte delivered.
  always @(posedge clk) begin
    got_byte   <= !rst && ready && read;
    ready_prev <= ready;
    if (!rst && drop_overflow) n_drops++;
  end

  always @(negedge clk) if (!rst) begin
    if (got_byte) begin
      byte_t b;
      outstanding--;
      if (cur.size() == 0) begin
        check(expected.size() > 0, "byte delivered with no packet expected");
        if (expected.size() > 0) cur = expected.pop_front();
      end
      if (cur.size() > 0) begin
        b = cur.pop_front();
        check(port_data == b, $sformatf("byte %0h, expected %0h", port_data, b));
        // ready falls exactly with the final byte of the packet
        check(ready == (cur.size() != 0), "ready does not mark the packet end");
        if (cur.size() == 0) n_read_pkts++;
      end
    end
    // ready may only rise after at least one low cycle between packets
    if (ready && !ready_prev) check(cur.size() == 0, "ready rose inside a packet");
    read <= reader_on && ($urandom_range(0, 3) != 0);
  end

  task automatic write_pkt(input bytes_q pkt);
    foreach (pkt[i]) begin
      wr            = 1'b1;
      wr_byte.data  = pkt[i];
      wr_byte.first = (i == 0);
      wr_byte.last  = (i == pkt.size() - 1);
      @(posedge clk);
      #1;
      if ($urandom_range(0, 4) == 0) begin  // occasional gap inside a packet
        wr = 1'b0;
        @(posedge clk);
        #1;
      end
    end
    wr = 1'b0;
  endtask

  function automatic bytes_q make_pkt(int n);
    bytes_q p;
    for (int i = 0; i < n; i++) p.push_back(8'($urandom));
    return p;
  endfunction

  initial begin
    bytes_q pkt;
    int n, used, lat;
    rst = 1'b1; wr = 1'b0; wr_byte = '0; read = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // Phase 1: concurrent traffic, never more than fits.
    reader_on = 1;
    for (int k = 0; k < 300; k++) begin
      n = $urandom_range(1, 20);
      while (outstanding + n > DEPTH) begin
        @(posedge clk);
        #1;
      end
      pkt = make_pkt(n);
      expected.push_back(pkt);
      outstanding += n;
      write_pkt(pkt);
    end
    while (expected.size() > 0 || cur.size() > 0) begin
      @(posedge clk);
      #1;
    end
    check(n_drops == 0, "drop in phase 1");
    check(n_read_pkts == 300, $sformatf("phase 1 read %0d packets", n_read_pkts));

    // Phase 2: reader stopped, overflow the buffer.
    reader_on = 0;
    repeat (3) @(posedge clk);
    #1;
    used = 0;
    for (int k = 0; k < 6; k++) begin
      n = (k == 5) ? 3 : 15;     // 4 x 15 = 60 fit, the fifth is dropped, then 3 fit
      pkt = make_pkt(n);
      if (used + n <= DEPTH) begin
        expected.push_back(pkt);
        outstanding += n;
        used += n;
      end
      write_pkt(pkt);
    end
    repeat (3) @(posedge clk);
    check(n_drops == 1, $sformatf("phase 2 overflow drops %0d, expected 1", n_drops));
    #1 reader_on = 1;
    while (expected.size() > 0 || cur.size() > 0) begin
      @(posedge clk);
      #1;
    end
    check(n_read_pkts == 305, $sformatf("phase 2 read %0d packets in all", n_read_pkts));

    // Phase 3: latency from the final byte's write to ready.
    reader_on = 0;
    repeat (4) @(posedge clk);
    #1;
    pkt = make_pkt(1);
    expected.push_back(pkt);
    outstanding += 1;
    wr = 1'b1; wr_byte = '{first: 1'b1, last: 1'b1, data: pkt[0]};
    @(posedge clk);
    #1 wr = 1'b0;
    lat = 0;
    while (!ready && lat < 10) begin
      @(posedge clk);
      #1 lat++;
    end
    check(lat == 1, $sformatf("ready came %0d cycles after the write edge, expected 1", lat));
    reader_on = 1;
    while (expected.size() > 0 || cur.size() > 0) begin
      @(posedge clk);
      #1;
    end
    check(outstanding == 0, "bytes left over");

    $display("packets read %0d, overflow drops %0d", n_read_pkts, n_drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
