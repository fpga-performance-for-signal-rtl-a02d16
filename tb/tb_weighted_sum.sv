// tb_weighted_sum - three instances (1, 3 and 9 lanes) summing 9 random signed
// products; checks each sum against a direct computation and checks that done comes
// exactly ceil(9/LANES) edges after the edge that sampled start.
module tb_weighted_sum;
  localparam int N = 9, XW = 18, CW = 18, AW = 42;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][XW-1:0] x;
  logic [N-1:0][CW-1:0] c;
  logic busy1, busy3, busy9, done1, done3, done9;
  logic signed [AW-1:0] acc1, acc3, acc9;
  int checks = 0, failures = 0;

  weighted_sum #(.N(N), .LANES(1), .X_W(XW), .C_W(CW), .ACC_W(AW)) u1 (.clk, .rst_n, .start, .x, .c, .busy(busy1), .done(done1), .acc(acc1));
  weighted_sum #(.N(N), .LANES(3), .X_W(XW), .C_W(CW), .ACC_W(AW)) u3 (.clk, .rst_n, .start, .x, .c, .busy(busy3), .done(done3), .acc(acc3));
  weighted_sum #(.N(N), .LANES(9), .X_W(XW), .C_W(CW), .ACC_W(AW)) u9 (.clk, .rst_n, .start, .x, .c, .busy(busy9), .done(done9), .acc(acc9));

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_done(input int lanes, input int edges, input logic d, input logic signed [AW-1:0] a, input longint exp);
    int steps;
    steps = (N + lanes - 1) / lanes;
    checks++;
    if (d != (edges == steps)) begin failures++; $display("lanes %0d: done=%0d at edge %0d", lanes, d, edges); end
    if (edges == steps) begin
      checks++;
      if (longint'(a) != exp) begin failures++; $display("lanes %0d: sum %0d expected %0d", lanes, a, exp); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      longint exp;
      exp = 0;
      for (int i = 0; i < N; i++) begin
        case (t % 4)
          0: begin x[i] = XW'(-(1 << (XW-1))); c[i] = CW'(-(1 << (CW-1))); end  // extremes
          1: begin x[i] = XW'((1 << (XW-1)) - 1); c[i] = CW'(-(1 << (CW-1))); end
          default: begin x[i] = XW'($urandom); c[i] = CW'($urandom); end
        endcase
        exp += longint'($signed(x[i])) * longint'($signed(c[i]));
      end
      start = 1;
      @(negedge clk);          // start sampled at this edge
      start = 0;
      for (int e = 1; e <= 10; e++) begin
        @(negedge clk);
        check_done(1, e, done1, acc1, exp);
        check_done(3, e, done3, acc3, exp);
        check_done(9, e, done9, acc9, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
