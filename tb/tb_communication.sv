// tb_communication: self-checking test of the Avalon-MM register block.
//
// Acts as the bus master. Writes random box corners at word addresses 2n and
// 2n+1 and checks that they appear on min_w[n]/max_w[n] and nowhere else;
// drives random counts and checks reads at addresses 0..7 one clock later;
// checks the 32'hAAAA_AAAA pattern at unused addresses, that nothing happens
// without chipselect, and that writes to unused addresses change nothing.
module tb_communication;
  import cardcounter_pkg::*;

  localparam int N = 8;

  logic clk = 1'b0;
  logic reset_n = 1'b0;
  logic read, write, chipselect;
  logic [7:0] address;
  logic [31:0] readdata, writedata;
  logic [N-1:0][31:0] count;
  rgb_word_t [N-1:0] min_w, max_w;

  logic [31:0] exp_min [N];
  logic [31:0] exp_max [N];

  int checks = 0, failures = 0;

  communication dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic bus_write(logic [7:0] a, logic [31:0] d, bit cs = 1);
    @(negedge clk);
    chipselect = cs; write = 1'b1; address = a; writedata = d;
    @(negedge clk);
    chipselect = 1'b0; write = 1'b0;
  endtask

  // Read with fixed latency one: data is sampled one clock after the request.
  task automatic bus_read(logic [7:0] a, output logic [31:0] d, input bit cs = 1);
    @(negedge clk);
    chipselect = cs; read = 1'b1; address = a;
    @(negedge clk);
    chipselect = 1'b0; read = 1'b0;
    d = readdata;
  endtask

  task automatic check_regs(string what);
    for (int i = 0; i < N; i++) begin
      check($sformatf("%s min%0d", what, i), min_w[i], exp_min[i]);
      check($sformatf("%s max%0d", what, i), max_w[i], exp_max[i]);
    end
  endtask

  initial begin
    logic [31:0] d, held;
    read = 0; write = 0; chipselect = 0; address = 0; writedata = 0;
    for (int i = 0; i < N; i++) begin
      count[i] = $urandom; exp_min[i] = '0; exp_max[i] = '0;
    end
    repeat (2) @(negedge clk);
    reset_n = 1'b1;
    check_regs("after reset");

    // Program every class in random order, twice.
    for (int k = 0; k < 8 * N; k++) begin
      int a;
      a = $urandom_range(0, 2 * N - 1);
      d = $urandom;
      bus_write(8'(a), d);
      if (a % 2 == 0) exp_min[a / 2] = d; else exp_max[a / 2] = d;
    end
    check_regs("after writes");

    // Writes that must be ignored: unused address, no chipselect.
    bus_write(8'd16, 32'hDEAD_BEEF);
    bus_write(8'd255, 32'h1234_5678);
    bus_write(8'd3, 32'h0BAD_F00D, 0);
    check_regs("after ignored writes");

    // Reads of the counters.
    for (int k = 0; k < 3; k++) begin
      for (int i = 0; i < N; i++) count[i] = $urandom;
      for (int i = N - 1; i >= 0; i--) begin
        bus_read(8'(i), d);
        check($sformatf("count%0d", i), d, count[i]);
      end
    end
    bus_read(8'd8, d);   check("unused read 8", d, 32'hAAAA_AAAA);
    bus_read(8'd200, d); check("unused read 200", d, 32'hAAAA_AAAA);

    // Without chipselect readdata keeps its last value.
    bus_read(8'd2, d);
    held = d;
    count[2] = ~count[2];
    bus_read(8'd2, d, 0);
    check("read without chipselect", d, held);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
