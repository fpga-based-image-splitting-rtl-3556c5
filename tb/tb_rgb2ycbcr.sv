// tb_rgb2ycbcr: drives corner colours and random pixels, compares with the
// BT.601 reference and checks the two-clock latency of valid and sof.
module tb_rgb2ycbcr;
  import split_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_sof = 0, out_valid, out_sof;
  rgb_t in_pix = '0;
  ycc_t out_pix;
  ycc_t exp_q[$];
  logic sof_q[$];
  int checks = 0, failures = 0, sent = 0, cyc = 0, first_out = -1;

  rgb2ycbcr dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst && out_valid) begin
      ycc_t e;
      if (first_out < 0) first_out = cyc;
      e = exp_q.pop_front();
      checks++;
      if (out_pix !== e || out_sof !== sof_q.pop_front()) begin
        failures++;
        $display("FAIL got %h expected %h", out_pix, e);
      end
    end
  end

  initial begin
    int start_cyc;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i == 0) start_cyc = cyc;
      in_valid = (i < 8) || ($urandom_range(3) != 0);
      in_sof = (i == 0);
      case (i)
        0: in_pix = '{8'd0, 8'd0, 8'd0};
        1: in_pix = '{8'd255, 8'd255, 8'd255};
        2: in_pix = '{8'd255, 8'd0, 8'd0};
        3: in_pix = '{8'd0, 8'd255, 8'd0};
        4: in_pix = '{8'd0, 8'd0, 8'd255};
        5: in_pix = '{8'd255, 8'd255, 8'd0};
        6: in_pix = '{8'd0, 8'd255, 8'd255};
        7: in_pix = '{8'd255, 8'd0, 8'd255};
        default: in_pix = rgb_t'($urandom);
      endcase
      if (in_valid) begin
        exp_q.push_back(ref_rgb2ycc(in_pix));
        sof_q.push_back(in_sof);
        sent++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(negedge clk);
    // latency: two register stages, so the first output is seen at the third
    // rising edge after the first input was presented
    checks++;
    if (first_out - start_cyc != 3) begin
      failures++;
      $display("FAIL latency %0d", first_out - start_cyc);
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
