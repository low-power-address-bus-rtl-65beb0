// tb_xor_link_decoder: self-checking test of the XOR (transition-signalling)
// receiving stage.
//
// The test codes a random bus stream itself: each transferred pattern is the
// bus value exclusive-ored with the previous transferred bus value. Runs of
// repeated bus values are mixed in, and so are random gaps. During a transfer
// the stage must give back the original bus value in the same clock. Between
// transfers it must hold that value, whatever is on the lines. After reset it
// must show 0.
module tb_xor_link_decoder;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [W-1:0] in_line = '0;
  logic [W-1:0] out_bus;
  int checks = 0, failures = 0, n_frozen = 0;

  always #5 clk = ~clk;

  xor_link_decoder #(.W(W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [W-1:0] prev, b;

  initial begin
    prev = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    #1 check(out_bus == '0, "reset value");
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        if ($urandom_range(0, 2) == 0) begin b = prev; n_frozen++; end
        else b = W'($urandom());
        in_line = b ^ prev;
        prev    = b;
      end else begin
        in_line = W'($urandom());
      end
      #1 check(out_bus == prev, $sformatf("step %0d valid %b got %h exp %h", i, in_valid, out_bus, prev));
    end
    check(n_frozen > 100, $sformatf("frozen transfers %0d", n_frozen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
