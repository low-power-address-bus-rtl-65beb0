// tb_vstride_unit: self-checking test of the variable-stride unit.
//
// Three instances run side by side on the same address stream: endurance 1
// (a new stride takes effect after one appearance), endurance 2 (it must
// appear twice in a row) and endurance 0 (fixed stride 4). The stream is
// made of runs at several strides, including negative ones, broken by
// random addresses. Each instance's prediction (last address + chosen
// stride) is compared with a software model before every update, and a
// hand-worked sequence checks the endurance-2 rule step by step.
module tb_vstride_unit;
  import codec_ref_pkg::*;

  localparam int AW = 16;
  logic clk = 0, rst_n = 0;
  logic upd = 0;
  logic [AW-1:0] addr = '0;
  logic [AW-1:0] pred1, pred2, pred0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vstride_unit #(.AW(AW), .ENDURANCE(1), .INIT_STRIDE(4)) u1 (.clk, .rst_n, .upd, .addr, .pred(pred1));
  vstride_unit #(.AW(AW), .ENDURANCE(2), .INIT_STRIDE(4)) u2 (.clk, .rst_n, .upd, .addr, .pred(pred2));
  vstride_unit #(.AW(AW), .ENDURANCE(0), .INIT_STRIDE(4)) u0 (.clk, .rst_n, .upd, .addr, .pred(pred0));

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

  task automatic step(logic [AW-1:0] a);
    @(negedge clk); addr = a; upd = 1;
    @(posedge clk); #1 upd = 0;
  endtask

  initial begin
    automatic vs_ref #(AW, 1, 4) m1 = new();
    automatic vs_ref #(AW, 2, 4) m2 = new();
    automatic vs_ref #(AW, 0, 4) m0 = new();
    automatic logic [AW-1:0] a = 16'h2000, s = 16'd8;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(pred1 == 4 && pred2 == 4 && pred0 == 4, "reset: last 0, stride 4");
    // Endurance 2 by hand: strides 8, 8 -> chosen 8; then 2 once -> still 8.
    step(16'h0100);                 // stride 0x100 seen once
    check(pred2 == 16'h0104 && pred1 == 16'h0200, "after 0100");
    step(16'h0108);                 // stride 8 (new candidate)
    check(pred2 == 16'h010C && pred1 == 16'h0110, "after 0108");
    step(16'h0110);                 // stride 8 again -> matured
    check(pred2 == 16'h0118, $sformatf("endurance 2 matured, pred %h", pred2));
    step(16'h0112);                 // stride 2 once
    check(pred2 == 16'h011A && pred1 == 16'h0114, "endurance 2 keeps 8");
    check(pred0 == 16'h0116, "fixed stride stays 4");

    @(negedge clk); rst_n = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(0, 15) == 0) begin
        case ($urandom_range(0, 4))
          0: s = 16'd4; 1: s = 16'd2; 2: s = 16'hFFFC; 3: s = 16'd64; default: s = 16'd1;
        endcase
      end
      a = ($urandom_range(0, 9) == 0) ? AW'($urandom()) : a + s;
      check(pred1 == AW'(m1.pred()) && pred2 == AW'(m2.pred()) && pred0 == AW'(m0.pred()),
            $sformatf("step %0d preds %h %h %h", n, pred1, pred2, pred0));
      m1.learn(a); m2.learn(a); m0.learn(a);
      step(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
