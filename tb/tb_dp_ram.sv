// tb_dp_ram: writes random words, reads them back with one clock of latency and
// checks that a read of the address being written returns the old word.
module tb_dp_ram;
  localparam int DEPTH = 64;
  logic clk = 0, wr_en = 0;
  logic [5:0] wr_addr = 0, rd_addr = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0, cycles = 0;

  dp_ram #(.DEPTH(DEPTH), .WIDTH(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rd_data, exp);
    end
  endtask

  initial begin
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(a); wr_data = 8'($urandom); model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    // read back, one clock latency
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); rd_addr = 6'(a);
      @(negedge clk); check(model[a], "readback");
    end
    // read-during-write to the same address returns old data, then new
    for (int i = 0; i < 20; i++) begin
      int a;
      logic [7:0] old;
      a = $urandom_range(DEPTH - 1);
      old = model[a];
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(a); wr_data = 8'($urandom); rd_addr = 6'(a); model[a] = wr_data;
      @(negedge clk); wr_en = 0;
      check(old, "read during write");
      @(negedge clk); check(model[a], "read after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
