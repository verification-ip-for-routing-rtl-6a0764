// Self-checking testbench for port_addr_mem, the switch's port address table.
//
// Checks the addresses loaded at reset (port n = n), then makes random
// accesses through the memory port (writes, read-backs, and cycles with
// mem_en low that must change nothing) against a reference copy of the
// table kept here. Read data is checked one clock after the read, and the
// port_addr outputs are checked after every cycle.
module tb_port_addr_mem;
  import switch_pkg::*;

  localparam int unsigned N = 4;

  logic         clk = 1'b0;
  logic         rst;
  logic         mem_en, mem_rd_wr;
  logic [1:0]   mem_add;
  logic [7:0]   mem_data, mem_rdata;
  logic [7:0]   port_addr [N];

  int checks = 0, failures = 0;

  port_addr_mem #(.NUM_PORTS(N), .ADDR_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  logic [7:0] model [N];

  initial begin
    rst = 1'b1; mem_en = 1'b0; mem_rd_wr = 1'b0; mem_add = '0; mem_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int p = 0; p < N; p++) begin
      model[p] = 8'(p);
      check(port_addr[p] == 8'(p), $sformatf("reset address of port %0d is %0h", p, port_addr[p]));
    end

    for (int i = 0; i < 2000; i++) begin
      mem_en    = ($urandom_range(0, 3) != 0);
      mem_rd_wr = $urandom_range(0, 1);
      mem_add   = 2'($urandom_range(0, N - 1));
      mem_data  = 8'($urandom);
      @(posedge clk);
      #1;
      if (mem_en && mem_rd_wr) model[mem_add] = mem_data;
      if (mem_en && !mem_rd_wr) begin
        check(mem_rdata == model[mem_add], $sformatf("read of port %0d gave %0h, expected %0h",
                                                     mem_add, mem_rdata, model[mem_add]));
      end
      for (int p = 0; p < N; p++)
        check(port_addr[p] == model[p], $sformatf("port %0d address %0h, expected %0h",
                                                  p, port_addr[p], model[p]));
    end

    // The standard configuration (port n = address n) written through the memory port.
    for (int p = 0; p < N; p++) begin
      mem_en = 1'b1; mem_rd_wr = 1'b1; mem_add = 2'(p); mem_data = 8'(p);
      @(posedge clk); #1;
    end
    mem_en = 1'b0;
    for (int p = 0; p < N; p++)
      check(port_addr[p] == 8'(p), "standard configuration");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
