// tb_bc_strobe_sync - toggles the input at random intervals (4..20 cycles) and checks
// one strobe per change, exactly three clock edges after the edge that changed it.
module tb_bc_strobe_sync;
  logic clk = 0, rst_n = 0, toggle_in = 0, strobe;
  int checks = 0, failures = 0;
  int cyc = 0, flips = 0, strobes = 0;
  int due [$];

  bc_strobe_sync dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Strobe observed after each edge: must match a scheduled change.
  always @(negedge clk) if (rst_n) begin
    if (strobe) begin
      strobes++;
      checks++;
      if (due.size() == 0 || due[0] != cyc) begin
        failures++; $display("unexpected strobe at %0d", cyc);
      end else void'(due.pop_front());
    end else if (due.size() != 0 && due[0] == cyc) begin
      checks++; failures++; $display("missing strobe at %0d", cyc); void'(due.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      repeat ($urandom_range(4, 20)) @(posedge clk);
      toggle_in <= ~toggle_in;       // changes at edge cyc+1 (counted after this edge)
      flips++;
      due.push_back(cyc + 1 + 2);    // seen at edges +1, +2, strobe high after edge +2
    end
    repeat (10) @(posedge clk);
    checks++;
    if (strobes != flips) begin failures++; $display("strobes %0d flips %0d", strobes, flips); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
