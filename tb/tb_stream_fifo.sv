// tb_stream_fifo: pushes a random sequence through a 3-entry FIFO with random
// valid and ready, checks order and content against a queue, and checks
// that the FIFO reports full after DEPTH pushes without pops.
module tb_stream_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic iv, ir, ov, orr;
  logic [15:0] id, od;
  stream_fifo #(.WIDTH(16), .DEPTH(3)) dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
                                           .out_valid(ov), .out_ready(orr), .out_data(od));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] model[$];
  int sent = 0, got = 0;
  initial begin
    iv = 0; orr = 0; id = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // fill without popping
    for (int i = 0; i < 3; i++) begin
      iv = 1; id = 16'(100 + i);
      @(negedge clk);
      if (ir) begin model.push_back(16'(100 + i)); sent++; end
      @(posedge clk); #1;
    end
    iv = 0;
    checks++;
    if (ir) begin failures++; $display("FIFO not full after DEPTH pushes"); end
    // random traffic
    while (got < 400) begin
      iv = (sent < 400) && ($urandom % 3 != 0);
      id = 16'($urandom);
      orr = ($urandom % 2 == 0);
      @(negedge clk);
      if (ov && orr) begin
        checks++;
        if (model.size() == 0 || od != model[0]) begin failures++; $display("order error"); end
        if (model.size() != 0) void'(model.pop_front());
        got++;
      end
      if (iv && ir) begin model.push_back(id); sent++; end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
