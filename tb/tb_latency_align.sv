// tb_latency_align - two instances (capture after 1 BC with no delay, capture after
// 2 BC with a delay of 2). The data input changes every cycle, as the fast domain's
// result register would; checks that each output carries the value present CAP_BC
// edges after its tag and appears CAP_BC + DELAY_BC edges after it, and nothing else.
module tb_latency_align;
  localparam int W = 25;
  logic clk = 0, rst_n = 0, tag_in = 0;
  logic [W-1:0] data_in = '0;
  logic v1, v2;
  logic [W-1:0] d1, d2;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [W-1:0] hist [int];
  bit tagh [int];

  latency_align #(.CAP_BC(1), .DELAY_BC(0), .W(W)) u1 (.clk, .rst_n, .tag_in, .data_in, .out_valid(v1), .out_data(d1));
  latency_align #(.CAP_BC(2), .DELAY_BC(2), .W(W)) u2 (.clk, .rst_n, .tag_in, .data_in, .out_valid(v2), .out_data(d2));

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int cap, input int dly, input logic v, input logic [W-1:0] d);
    int src;
    src = cyc - cap - dly;           // edge that raised the tag
    checks++;
    if (v != (tagh.exists(src) && tagh[src])) begin
      failures++; $display("cap %0d: valid=%0d at %0d", cap, v, cyc);
    end else if (v) begin
      checks++;
      if (d != hist[src + cap - 1]) begin failures++; $display("cap %0d: data wrong at %0d", cap, cyc); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      // Values driven now are sampled at the next edge, number cyc+1.
      tag_in  = ($urandom_range(0, 2) == 0);
      data_in = W'($urandom);
      tagh[cyc] = tag_in;            // a tag sampled at edge cyc+1 was raised at edge cyc
      hist[cyc] = data_in;           // data present before edge cyc+1
      @(negedge clk);
      cyc++;
      if (cyc > 6) begin
        check(1, 0, v1, d1);
        check(2, 2, v2, d2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
