// Self-checking test of the SLL shift counter SCnt: load of sa, count down,
// ZeroC, and load priority over counting, against a model counter.
module tb_shift_counter;
  logic clk = 0, rst = 1, scw = 0, sce = 0;
  logic [4:0] sa, cnt, model;
  logic zc;
  int checks = 0, failures = 0, zero_seen = 0;

  shift_counter dut (.clk, .rst, .sc_write(scw), .sc_en(sce), .sa, .count(cnt), .zero_c(zc));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0; sa = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      scw = ($urandom % 8) == 0;
      sce = ($urandom % 4) != 0;
      sa  = 5'($urandom);
      @(posedge clk);
      if (scw) model = sa; else if (sce) model = model - 1;
      #1;
      checks++;
      if (cnt !== model || zc !== (model == 0)) begin
        failures++;
        $display("FAIL cnt=%0d exp=%0d zc=%b", cnt, model, zc);
      end
      if (zc) zero_seen++;
    end
    checks++;
    if (zero_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
