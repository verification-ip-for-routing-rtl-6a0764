// Self-checking testbench for input_port, the switch's framing and routing
// stage.
//
// Sends random packets (random length, some whose destination matches no
// port, some with a length field that disagrees with their size) with random
// idle gaps, and rebuilds from the q_wr/q_byte strobes what each output
// queue received. Every packet must arrive whole and unchanged, with first
// and last flags on its end bytes, at the port whose address equals its
// destination; unmatched packets must raise drop_unmatched and reach no
// port. The first byte must leave exactly two clocks after it was sampled.
module tb_input_port;
  import switch_pkg::*;

  localparam int unsigned N = 4;

  logic      clk = 1'b0;
  logic      rst;
  logic      data_status;
  byte_t     data;
  byte_t     port_addr [N];
  logic      q_wr [N];
  pkt_byte_t q_byte;
  logic      drop_unmatched;

  int checks = 0, failures = 0;

  input_port #(.NUM_PORTS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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
  bytes_q expected [N][$];  // packets each port should receive, in order
  bytes_q got_cur  [N];     // packet being collected per port
  int     n_drops_expected = 0, n_drops_seen = 0, n_received = 0;
  longint cycle = 0;
  longint first_sent_cycle[$];   // sampling cycle of each routed packet's first byte

  always @(posedge clk) cycle <= cycle + 1;

  // Receiver: collect bytes per queue.
  always @(posedge clk) if (!rst) begin
    if (drop_unmatched) n_drops_seen++;
    for (int p = 0; p < N; p++) begin
      if (q_wr[p]) begin
        if (q_byte.first) begin
          check(got_cur[p].size() == 0, "first flag inside a packet");
          got_cur[p] = {};
          // first byte leaves two cycles after being sampled
          check(first_sent_cycle.size() > 0 && cycle == first_sent_cycle[0] + 2,
                $sformatf("first byte latency: sampled %0d, left %0d",
                          first_sent_cycle.size() > 0 ? first_sent_cycle[0] : -1, cycle));
          if (first_sent_cycle.size() > 0) void'(first_sent_cycle.pop_front());
        end
        got_cur[p].push_back(q_byte.data);
        if (q_byte.last) begin
          n_received++;
          if (expected[p].size() == 0) begin
            check(0, $sformatf("unexpected packet at port %0d", p));
          end else begin
            bytes_q e;
            e = expected[p].pop_front();
            check(e == got_cur[p], $sformatf("port %0d packet mismatch (%0d vs %0d bytes)",
                                             p, got_cur[p].size(), e.size()));
          end
          got_cur[p] = {};
        end
      end
    end
  end

  task automatic send(input bytes_q pkt);
    int dest = -1;
    for (int p = N - 1; p >= 0; p--) if (port_addr[p] == pkt[0]) dest = p;
    if (dest < 0) n_drops_expected++;
    else begin
      expected[dest].push_back(pkt);
      first_sent_cycle.push_back(cycle);
    end
    foreach (pkt[i]) begin
      data_status = 1'b1;
      data        = pkt[i];
      @(posedge clk);
      #1;
    end
    data_status = 1'b0;
    data        = 8'($urandom);
    repeat ($urandom_range(1, 3)) begin
      @(posedge clk);
      #1;
    end
  endtask

  initial begin
    bytes_q pkt;
    int n;
    rst = 1'b1; data_status = 1'b0; data = '0;
    port_addr[0] = 8'h00; port_addr[1] = 8'h01; port_addr[2] = 8'h02; port_addr[3] = 8'h03;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    for (int k = 0; k < 400; k++) begin
      if (k == 200) begin
        // reconfigured addresses, one of them duplicated (lowest port wins)
        port_addr[0] = 8'h55; port_addr[1] = 8'hA0; port_addr[2] = 8'hA0; port_addr[3] = 8'hFF;
      end
      pkt = {};
      case ($urandom_range(0, 5))
        0:       pkt.push_back(8'h80 + 8'($urandom_range(0, 15)));  // no such port
        default: pkt.push_back(port_addr[$urandom_range(0, N - 1)]);
      endcase
      pkt.push_back(8'($urandom));                 // source address
      n = (k % 50 == 7) ? 255 : $urandom_range(0, 20);
      pkt.push_back(8'(($urandom_range(0, 7) == 0) ? n + 3 : n));  // length field
      repeat (n) pkt.push_back(8'($urandom));
      pkt.push_back(8'($urandom));                 // FCS
      send(pkt);
    end
    // single-byte frame: first and last on the same byte
    pkt = {port_addr[3]};
    send(pkt);
    repeat (10) @(posedge clk);

    for (int p = 0; p < N; p++)
      check(expected[p].size() == 0, $sformatf("port %0d missing %0d packets", p, expected[p].size()));
    check(n_drops_seen == n_drops_expected,
          $sformatf("drop_unmatched pulses %0d, expected %0d", n_drops_seen, n_drops_expected));
    check(n_drops_expected > 0, "no unmatched packet was sent");
    $display("packets received %0d, dropped %0d", n_received, n_drops_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
