// Layered verification components for the packet switch.
//
// switch_packet   one packet: destination, source, length field, data, FCS,
//                 and its kind (good or bad FCS, good or bad length field)
// switch_scoreboard
//                 keeps a copy of the port address table, predicts for every
//                 packet sent where it must come out (or that it is dropped
//                 because no port matches or the port's buffer is full), and
//                 compares what the receivers collect against that
// switch_mem_driver
//                 configures and reads back the port address table
// switch_driver   sends packets on the input port, one byte per clock
// switch_receiver reads one output port with a random read pattern and
//                 hands each packet it collects to the scoreboard
//
// The FCS byte is computed here as the XOR of all header and data bytes for
// a good-FCS packet and its complement for a bad one; the switch forwards
// the byte without looking at it, so the choice does not affect the check.
// All signals are driven and sampled at the falling clock edge, away from
// the rising edge at which the switch samples and updates.
package switch_vip_pkg;

  typedef logic [7:0] byte_t;
  typedef byte_t bytes_q[$];

  typedef enum {GOOD_FCS, BAD_FCS} fcs_kind_e;
  typedef enum {GOOD_LENGTH, BAD_LENGTH} length_kind_e;

  class switch_packet;
    byte_t        da, sa, len, fcs;
    bytes_q       payload;
    fcs_kind_e    fcs_kind;
    length_kind_e length_kind;

    function new(byte_t da_i, byte_t sa_i, int n_data, fcs_kind_e fk, length_kind_e lk);
      da          = da_i;
      sa          = sa_i;
      fcs_kind    = fk;
      length_kind = lk;
      for (int i = 0; i < n_data; i++) payload.push_back(byte_t'($urandom));
      // a bad length field claims more data bytes than the packet carries
      len = (lk == GOOD_LENGTH) ? byte_t'(n_data) : byte_t'(n_data + $urandom_range(1, 5));
      fcs = calc_fcs();
      if (fk == BAD_FCS) fcs = ~fcs;
    endfunction

    function byte_t calc_fcs();
      byte_t x = da ^ sa ^ len;
      foreach (payload[i]) x ^= payload[i];
      return x;
    endfunction

    function bytes_q pack();
      bytes_q b;
      b.push_back(da);
      b.push_back(sa);
      b.push_back(len);
      foreach (payload[i]) b.push_back(payload[i]);
      b.push_back(fcs);
      return b;
    endfunction

    function void display();
      bytes_q b = pack();
      $display("#----- PACKET KIND -----");
      $display("# fcs_kind    : %s", fcs_kind.name());
      $display("# length_kind : %s", length_kind.name());
      $display("#----- PACKET -----");
      foreach (b[i]) $display("# %0d : %h", i, b[i]);
      $display("#-----");
    endfunction
  endclass

  class switch_scoreboard;
    int unsigned num_ports, depth;
    byte_t       addr_table[];
    bytes_q      expected[][$];
    bit          blocked[];       // reader of this port is stopped
    int          stored[];        // bytes held by a blocked port
    int          exp_unmatched = 0, exp_overflow = 0;
    int          checks = 0, failures = 0;
    int          matched = 0;
    int          per_port[];

    function new(int unsigned n, int unsigned d);
      num_ports  = n;
      depth      = d;
      addr_table = new[n];
      expected   = new[n];
      blocked    = new[n];
      stored     = new[n];
      per_port   = new[n];
      foreach (addr_table[p]) addr_table[p] = byte_t'(p);
    endfunction

    function void check(bit ok, string what);
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL: %s", what);
      end
    endfunction

    // Which port a destination address goes to; -1 for none.
    function int route(byte_t da);
      for (int p = 0; p < int'(num_ports); p++) if (addr_table[p] == da) return p;
      return -1;
    endfunction

    function void predict(switch_packet pkt);
      bytes_q b = pkt.pack();
      int     p = route(pkt.da);
      if (p < 0) begin
        exp_unmatched++;
        return;
      end
      if (blocked[p]) begin
        if (stored[p] + b.size() > int'(depth)) begin
          exp_overflow++;
          return;
        end
        stored[p] += b.size();
      end
      expected[p].push_back(b);
    endfunction

    function void received(int p, bytes_q got);
      if (expected[p].size() == 0) begin
        check(0, $sformatf("port %0d: packet of %0d bytes not expected", p, got.size()));
        return;
      end
      begin
        bytes_q e = expected[p].pop_front();
        check(e == got, $sformatf("port %0d: packet mismatch (%0d bytes, expected %0d)",
                                  p, got.size(), e.size()));
        if (e == got) begin
          matched++;
          per_port[p]++;
        end
      end
    endfunction

    function int pending();
      int n = 0;
      foreach (expected[p]) n += expected[p].size();
      return n;
    endfunction
  endclass

  class switch_mem_driver;
    virtual switch_mem_if vif;
    switch_scoreboard     sb;
    int                   n_writes = 0, n_reads = 0;

    function new(virtual switch_mem_if v, switch_scoreboard s);
      vif = v;
      sb  = s;
    endfunction

    task idle();
      vif.mem_en    = 1'b0;
      vif.mem_rd_wr = 1'b0;
      vif.mem_add   = '0;
      vif.mem_data  = '0;
    endtask

    task write(int port, byte_t addr);
      @(negedge vif.clk);
      vif.mem_en    = 1'b1;
      vif.mem_rd_wr = 1'b1;
      vif.mem_add   = port[1:0];
      vif.mem_data  = addr;
      @(negedge vif.clk);
      idle();
      sb.addr_table[port] = addr;
      n_writes++;
    endtask

    task read_check(int port);
      @(negedge vif.clk);
      vif.mem_en    = 1'b1;
      vif.mem_rd_wr = 1'b0;
      vif.mem_add   = port[1:0];
      vif.mem_data  = byte_t'($urandom);
      @(negedge vif.clk);
      idle();
      sb.check(vif.mem_rdata == sb.addr_table[port],
               $sformatf("memory port read of port %0d gave %h, expected %h",
                         port, vif.mem_rdata, sb.addr_table[port]));
      n_reads++;
    endtask
  endclass

  class switch_driver;
    virtual switch_in_if vif;
    switch_scoreboard    sb;
    int                  n_sent = 0;
    int                  n_kind[4];   // GOOD/BAD FCS x GOOD/BAD length
    int                  n_max_len = 0;

    function new(virtual switch_in_if v, switch_scoreboard s);
      vif = v;
      sb  = s;
    endfunction

    task idle();
      vif.data_status = 1'b0;
      vif.data        = '0;
      vif.pkt_end     = 1'b0;
    endtask

    // Sends one packet and then idle_cycles idle clocks (at least one).
    task send(switch_packet pkt, int idle_cycles = 1);
      bytes_q b = pkt.pack();
      sb.predict(pkt);
      n_sent++;
      n_kind[2 * int'(pkt.fcs_kind) + int'(pkt.length_kind)]++;
      if (pkt.payload.size() == 255) n_max_len++;
      foreach (b[i]) begin
        @(negedge vif.clk);
        vif.data_status = 1'b1;
        vif.data        = b[i];
        vif.pkt_end     = (i == b.size() - 1);
      end
      repeat (idle_cycles < 1 ? 1 : idle_cycles) begin
        @(negedge vif.clk);
        idle();
      end
    endtask
  endclass

  class switch_receiver;
    virtual switch_out_if vif;
    switch_scoreboard     sb;
    int                   port;
    bit                   enabled = 1;
    int                   read_percent = 75;
    int                   n_pkts = 0, n_pauses = 0, n_back_to_back = 0;
    bytes_q               cur;
    bit                   pending = 0;
    int                   low_cycles = 0;

    function new(virtual switch_out_if v, switch_scoreboard s, int p);
      vif  = v;
      sb   = s;
      port = p;
    endfunction

    task run();
      vif.read = 1'b0;
      forever begin
        @(negedge vif.clk);
        if (pending) begin
          cur.push_back(vif.data);
          pending = 0;
          if (!vif.ready) begin       // ready fell with the final byte
            sb.received(port, cur);
            cur = {};
            n_pkts++;
          end
        end
        if (!vif.ready) low_cycles++;
        else begin
          if (cur.size() == 0 && low_cycles == 1) n_back_to_back++;
          low_cycles = 0;
        end
        vif.read = enabled && ($urandom_range(1, 100) <= read_percent);
        if (vif.ready && cur.size() > 0 && !vif.read) n_pauses++;
        pending = vif.ready && vif.read;
      end
    endtask
  endclass

endpackage
