// End-to-end testbench of the packet switch at its default size (four
// output ports, 1024-byte buffers).
//
// Built as a layered environment: a memory-port driver configures the port
// address table, a driver sends packets on the input port, one receiver per
// output port reads with a random read pattern, and a scoreboard predicts
// where every packet must come out and compares. The run covers:
//   - reading back the reset table and writing the port addresses through
//     the memory port, then changing them while traffic runs;
//   - random traffic to all four ports, with good and bad FCS bytes, good
//     and bad length fields, packets of every size up to 255 data bytes,
//     and destinations that match no port (dropped);
//   - a 235-data-byte packet whose length field says 237, sent to port
//     address 33h, printed byte by byte;
//   - a stopped reader on one port until its buffer overflows, so that
//     whole packets are dropped, then drained;
//   - the latency from the final input byte to ready (ready rises at the
//     third rising edge after the one that samples that byte) and a
//     packet read out at one byte per clock.
// Each of these events is counted, and an event that never happened counts
// as a failure.
module tb_switch_top;
  import switch_vip_pkg::*;

  localparam int unsigned N     = 4;
  localparam int unsigned DEPTH = 1024;   // the switch's default buffer size

  logic clk = 1'b0;
  logic reset;
  always #5 clk = ~clk;

  switch_mem_if #(.NUM_PORTS(N)) mem_if (clk);
  switch_in_if                   in_if  (clk);
  switch_out_if                  out_if [N] (clk);

  logic [N-1:0] ready, read;
  logic [7:0]   port_data [N];
  logic         drop_unmatched;
  logic [N-1:0] drop_overflow;

  switch_top dut (
    .clk            (clk),
    .reset          (reset),
    .mem_en         (mem_if.mem_en),
    .mem_rd_wr      (mem_if.mem_rd_wr),
    .mem_add        (mem_if.mem_add),
    .mem_data       (mem_if.mem_data),
    .mem_rdata      (mem_if.mem_rdata),
    .data_status    (in_if.data_status),
    .data           (in_if.data),
    .ready          (ready),
    .read           (read),
    .port_data      (port_data),
    .drop_unmatched (drop_unmatched),
    .drop_overflow  (drop_overflow)
  );

  for (genvar p = 0; p < N; p++) begin : g_port
    assign out_if[p].ready = ready[p];
    assign out_if[p].data  = port_data[p];
    assign read[p]         = out_if[p].read;
  end

  int checks = 0, failures = 0;
  switch_scoreboard sb;

  // Totals include the scoreboard's packet comparisons.
  task automatic report();
    int c = checks, f = failures;
    if (sb != null) begin
      c += sb.checks;
      f += sb.failures;
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  // Drop pulses seen on the switch's status outputs.
  int n_unmatched_seen = 0, n_overflow_seen = 0;
  always @(posedge clk) if (!reset) begin
    if (drop_unmatched) n_unmatched_seen++;
    n_overflow_seen += $countones(drop_overflow);
  end

  switch_mem_driver mdrv;
  switch_driver     drv;
  switch_receiver   rcv [N];

  task automatic wait_drained();
    int guard = 0;
    while (sb.pending() > 0 && guard < 20000) begin
      @(negedge clk);
      guard++;
    end
    repeat (4) @(negedge clk);
  endtask

  function automatic switch_packet random_packet(int max_data);
    byte_t        da;
    int           n;
    switch_packet pk;
    fcs_kind_e    fk = ($urandom_range(0, 1) == 0) ? GOOD_FCS : BAD_FCS;
    length_kind_e lk = ($urandom_range(0, 3) == 0) ? BAD_LENGTH : GOOD_LENGTH;
    if ($urandom_range(0, 9) == 0) da = 8'hC0 + 8'($urandom_range(0, 15));  // no such port
    else                           da = sb.addr_table[$urandom_range(0, N - 1)];
    n = ($urandom_range(0, 19) == 0) ? 255 : $urandom_range(0, max_data);
    pk = new(da, 8'($urandom), n, fk, lk);
    return pk;
  endfunction

  function automatic void count(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  initial begin
    switch_packet pkt;
    int t_last, t_ready, n_rd;

    sb   = new(N, DEPTH);
    mdrv = new(mem_if, sb);
    drv  = new(in_if, sb);
    rcv[0] = new(out_if[0], sb, 0);
    rcv[1] = new(out_if[1], sb, 1);
    rcv[2] = new(out_if[2], sb, 2);
    rcv[3] = new(out_if[3], sb, 3);

    reset = 1'b1;
    mdrv.idle();
    drv.idle();
    foreach (rcv[p]) rcv[p].enabled = 0;
    fork
      rcv[0].run();
      rcv[1].run();
      rcv[2].run();
      rcv[3].run();
    join_none
    repeat (4) @(negedge clk);
    reset = 1'b0;
    foreach (rcv[p]) rcv[p].enabled = 1;

    // Table after reset, then the port addresses written as in the
    // configuration table (port n = address n).
    for (int p = 0; p < N; p++) mdrv.read_check(p);
    for (int p = 0; p < N; p++) mdrv.write(p, 8'(p));

    // Random traffic.
    for (int k = 0; k < 150; k++) drv.send(random_packet(40), $urandom_range(1, 4));

    // New port addresses while traffic is in flight.
    mdrv.write(0, 8'h33);
    mdrv.write(1, 8'h5A);
    mdrv.write(2, 8'hA5);
    mdrv.write(3, 8'hF0);
    for (int p = 0; p < N; p++) mdrv.read_check(p);
    for (int k = 0; k < 150; k++) drv.send(random_packet(40), $urandom_range(1, 4));

    // Destination and source 33h, length field EDh
    // (237) with 235 data bytes behind it, bad FCS.
    pkt = new(8'h33, 8'h33, 235, BAD_FCS, BAD_LENGTH);
    pkt.len = 8'hED;
    pkt.fcs = ~pkt.calc_fcs();
    pkt.display();
    drv.send(pkt);
    wait_drained();

    // Overflow: port 2's reader stops; five largest packets and a small one.
    rcv[2].enabled = 0;
    sb.blocked[2]  = 1;
    sb.stored[2]   = 0;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 5; k++) begin
      pkt = new(sb.addr_table[2], 8'h01, 255, GOOD_FCS, GOOD_LENGTH);
      drv.send(pkt);
    end
    pkt = new(sb.addr_table[2], 8'h01, 10, GOOD_FCS, GOOD_LENGTH);
    drv.send(pkt);
    repeat (5) @(negedge clk);
    count(sb.exp_overflow == 2, $sformatf("expected 2 overflow drops, model has %0d", sb.exp_overflow));
    sb.blocked[2]  = 0;
    rcv[2].enabled = 1;
    wait_drained();

    // Latency and rate: port 0 read at full rate.
    rcv[0].read_percent = 100;
    pkt = new(sb.addr_table[0], 8'h07, 6, GOOD_FCS, GOOD_LENGTH);   // 10 bytes
    fork
      drv.send(pkt);
      begin
        // the last byte is driven at falling edge 10 and sampled at the
        // rising edge R after it; ready must rise at edge R+3, so it is
        // first seen high at the fourth falling edge after falling edge 10
        repeat (10) @(negedge clk);
        t_last = 0;
        while (!ready[0]) begin
          @(negedge clk);
          t_last++;
        end
        t_ready = t_last;
        n_rd = 0;
        while (ready[0]) begin
          @(negedge clk);
          n_rd++;
        end
      end
    join
    count(t_ready == 4, $sformatf("ready seen %0d falling edges after the last input byte, expected 4", t_ready));
    count(n_rd == 10, $sformatf("10-byte packet took %0d clocks to read, expected 10", n_rd));
    rcv[0].read_percent = 75;
    wait_drained();

    // Final accounting.
    count(sb.pending() == 0, $sformatf("%0d packets never came out", sb.pending()));
    count(n_unmatched_seen == sb.exp_unmatched,
          $sformatf("unmatched drops %0d, expected %0d", n_unmatched_seen, sb.exp_unmatched));
    count(n_overflow_seen == sb.exp_overflow,
          $sformatf("overflow drops %0d, expected %0d", n_overflow_seen, sb.exp_overflow));

    // Every mechanism must have happened at least once.
    count(mdrv.n_writes > 0,          "no memory-port write");
    count(mdrv.n_reads > 0,           "no memory-port read");
    for (int p = 0; p < N; p++)
      count(sb.per_port[p] > 0,       $sformatf("no packet through port %0d", p));
    count(sb.exp_unmatched > 0,       "no packet without a matching port");
    count(sb.exp_overflow > 0,        "no buffer overflow");
    count(drv.n_kind[0] > 0,          "no GOOD_FCS/GOOD_LENGTH packet");
    count(drv.n_kind[1] > 0,          "no GOOD_FCS/BAD_LENGTH packet");
    count(drv.n_kind[2] > 0,          "no BAD_FCS/GOOD_LENGTH packet");
    count(drv.n_kind[3] > 0,          "no BAD_FCS/BAD_LENGTH packet");
    count(drv.n_max_len > 0,          "no packet with 255 data bytes");
    begin
      int pauses = 0, b2b = 0;
      foreach (rcv[p]) begin
        pauses += rcv[p].n_pauses;
        b2b    += rcv[p].n_back_to_back;
      end
      count(pauses > 0, "reader never paused inside a packet");
      count(b2b > 0,    "no packet waited behind another");
      $display("sent %0d, matched %0d (ports %0d/%0d/%0d/%0d), unmatched %0d, overflow %0d",
               drv.n_sent, sb.matched, sb.per_port[0], sb.per_port[1], sb.per_port[2],
               sb.per_port[3], sb.exp_unmatched, sb.exp_overflow);
      $display("kinds gg/gb/bg/bb %0d/%0d/%0d/%0d, 255-byte %0d, pauses %0d, queued %0d",
               drv.n_kind[0], drv.n_kind[1], drv.n_kind[2], drv.n_kind[3], drv.n_max_len,
               pauses, b2b);
    end

    if (failures + sb.failures == 0) $display("***** TEST PASSED *****");
    report();
    $finish;
  end

endmodule
