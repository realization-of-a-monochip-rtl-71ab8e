// tb_sync_detector: a modelled least path metric grows by random amounts
// per step, slowly (as in sync) in some windows and fast (out of sync) in
// others, and is framed (less 32) whenever it reaches 32, as the decoder
// does. Each published speed must equal the true growth over the 128-step
// window, and sync_order must pulse exactly for windows above threshold.
module tb_sync_detector;
  logic clk = 0, rst_n = 0, step = 0, frame = 0, speed_valid, sync_order;
  logic [7:0] min_metric = 0;
  logic [15:0] threshold = 16'd150, speed;
  int checks = 0, failures = 0, orders = 0, windows = 0;

  sync_detector dut (
    .clk, .rst_n, .step, .min_metric, .frame, .threshold, .speed, .speed_valid, .sync_order);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r = 0, prev_inc = 0, acc = 0, t = 0, exp_speed = 0;
    bit exp_pub = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 12; w++) begin
      bit fast;
      fast = (w % 3) == 1;
      for (int k = 0; k < 128; k++) begin
        int inc;
        // idle cycles between steps
        while (($urandom % 3) == 0) begin
          step = 0;
          @(negedge clk);
          checks++;
          if (speed_valid || sync_order) failures++;
        end
        step = 1;
        min_metric = 8'(r);
        frame = (r >= 32);
        acc += prev_inc;
        exp_pub = (k == 127);
        exp_speed = acc;
        inc = fast ? int'(2 + $urandom % 6) : int'($urandom % 2);
        @(negedge clk);
        step = 0;
        checks++;
        if (speed_valid !== exp_pub) failures++;
        if (exp_pub) begin
          windows++;
          checks += 2;
          if (int'(speed) != exp_speed) begin
            failures++;
            $display("window %0d: speed %0d exp %0d", w, speed, exp_speed);
          end
          if (sync_order !== (exp_speed > 150)) begin
            failures++;
            $display("window %0d: order %b speed %0d", w, sync_order, exp_speed);
          end
          if (sync_order) orders++;
          acc = 0;
        end else begin
          checks++;
          if (sync_order) failures++;
        end
        r = r + inc - (frame ? 32 : 0);
        prev_inc = inc;
        t++;
      end
    end
    checks++;
    if (orders != 4) begin
      failures++;
      $display("%0d orders, expected 4", orders);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
