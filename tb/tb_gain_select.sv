// tb_gain_select - random windows, some with one or more saturated HG samples (4095)
// or samples just below; checks the flag and the selected window.
module tb_gain_select;
  localparam int N = 9, W = 12;
  logic [N-1:0][W-1:0] hg_win, lg_win, sel_win;
  logic use_lg;
  int checks = 0, failures = 0, n_lg = 0;

  gain_select #(.N(N), .W(W), .SAT(4095)) dut (.*);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      bit exp_lg;
      exp_lg = 0;
      for (int i = 0; i < N; i++) begin
        hg_win[i] = W'($urandom_range(0, 4094));
        lg_win[i] = W'($urandom);
      end
      case ($urandom_range(0, 3))
        0: hg_win[$urandom_range(0, N-1)] = 12'd4095;
        1: hg_win[$urandom_range(0, N-1)] = 12'd4094;
        default: ;
      endcase
      for (int i = 0; i < N; i++) if (hg_win[i] == 12'd4095) exp_lg = 1;
      #1;
      checks++;
      if (use_lg != exp_lg) begin failures++; $display("flag wrong, t=%0d", t); end
      checks++;
      if (sel_win != (exp_lg ? lg_win : hg_win)) begin failures++; $display("window wrong, t=%0d", t); end
      n_lg += exp_lg;
    end
    checks++;
    if (n_lg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
