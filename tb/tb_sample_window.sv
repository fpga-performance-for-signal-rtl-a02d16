// tb_sample_window - checks the sliding window against a software queue: contents,
// the first full window after N samples, win_valid only on accepted samples, and the
// toggle changing once per valid window. Includes pauses of the input stream.
module tb_sample_window;
  localparam int N = 9, W = 12;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [W-1:0] hg_in = '0, lg_in = '0;
  logic [N-1:0][W-1:0] hg_win, lg_win;
  logic win_valid, win_toggle;
  int checks = 0, failures = 0;
  int hq[$], lq[$];
  int accepted = 0;
  logic last_toggle;

  sample_window #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    last_toggle = win_toggle;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      in_valid = ($urandom_range(0, 4) != 0);
      hg_in = W'($urandom);
      lg_in = W'($urandom);
      @(negedge clk);
      if (in_valid) begin
        hq.push_back(hg_in); lq.push_back(lg_in); accepted++;
        if (hq.size() > N) begin void'(hq.pop_front()); void'(lq.pop_front()); end
      end
      checks++;
      if (win_valid != (in_valid && accepted >= N)) begin
        failures++; $display("win_valid wrong at cycle %0d", cyc);
      end
      checks++;
      if ((win_toggle != last_toggle) != (in_valid && accepted >= N)) begin
        failures++; $display("toggle wrong at cycle %0d", cyc);
      end
      last_toggle = win_toggle;
      if (accepted >= N) begin
        for (int i = 0; i < N; i++) begin
          checks++;
          if (hg_win[i] != W'(hq[i]) || lg_win[i] != W'(lq[i])) begin
            failures++; $display("window[%0d] wrong at cycle %0d", i, cyc);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
