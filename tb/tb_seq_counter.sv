// Self-checking test of the sequence/jump counter: random Reset, Load and Up
// with the priority Reset > Load > Up, against a model.
module tb_seq_counter;
  logic clk = 0, reset = 1, load = 0, up = 0;
  logic [3:0] d, q, model;
  int checks = 0, failures = 0;

  seq_counter dut (.clk, .reset, .load, .up, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0; d = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 2000; i++) begin
      reset = ($urandom % 10) == 0;
      load  = ($urandom % 6) == 0;
      up    = ($urandom % 4) != 0;
      d     = 4'($urandom);
      @(posedge clk);
      if (reset) model = 0; else if (load) model = d; else if (up) model = model + 1;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%0d exp=%0d", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
