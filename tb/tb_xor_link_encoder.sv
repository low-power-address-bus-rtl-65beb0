// tb_xor_link_encoder: self-checking test of the XOR (transition-signalling)
// sending stage.
//
// A random bus stream is driven with random gaps between transfers. Runs of
// repeated (frozen) bus values are mixed in. The test keeps its own copy of
// the previous transferred value. One clock after each transfer the lines
// must carry the new value exclusive-ored with that copy, and the control
// lines must carry the value given one clock earlier. Between transfers the
// lines must hold. After reset the lines and control lines must show 0 and
// CTL_INIT. A frozen bus must give all-zero lines.
module tb_xor_link_encoder;
  localparam int W  = 16;
  localparam int CW = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [W-1:0]  in_bus = '0;
  logic [CW-1:0] in_ctl = '0;
  logic out_valid;
  logic [W-1:0]  out_line;
  logic [CW-1:0] out_ctl;
  int checks = 0, failures = 0, n_zero = 0;

  always #5 clk = ~clk;

  xor_link_encoder #(.W(W), .CW(CW), .CTL_INIT(2'b10)) dut (.*);

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

  logic [W-1:0]  prev, exp_line, last_bus;
  logic [CW-1:0] exp_ctl;
  bit            exp_valid;

  initial begin
    prev = '0; exp_line = '0; exp_ctl = 2'b10; exp_valid = 0; last_bus = '0;
    repeat (3) @(posedge clk);
    #1;
    check(out_line == '0 && out_ctl == 2'b10 && !out_valid, "reset values");
    @(negedge clk); rst_n = 1;
    exp_ctl = in_ctl;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // Check what the previous clock's inputs produced.
      check(out_valid == exp_valid && out_line == exp_line && out_ctl == exp_ctl,
            $sformatf("step %0d line %h exp %h ctl %b exp %b valid %b", i, out_line,
                      exp_line, out_ctl, exp_ctl, out_valid));
      if (exp_valid && exp_line == '0) n_zero++;
      in_valid = ($urandom_range(0, 3) != 0);
      in_ctl   = CW'($urandom());
      if (in_valid) begin
        if ($urandom_range(0, 2) == 0) in_bus = last_bus;   // frozen bus
        else in_bus = W'($urandom());
      end else begin
        in_bus = W'($urandom());   // ignored without in_valid
      end
      exp_valid = in_valid;
      exp_ctl   = in_ctl;
      if (in_valid) begin
        exp_line = in_bus ^ prev;
        prev     = in_bus;
        last_bus = in_bus;
      end
    end
    check(n_zero > 100, $sformatf("frozen bus gave all-zero lines %0d times", n_zero));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
