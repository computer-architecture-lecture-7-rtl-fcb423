// Self-checking test of the unified memory: random word writes and reads
// against a shadow array, including address wrap-around of the exception
// vector 0x8000_0180 onto word 0x60, and a zero read when MemRead is low.
module tb_unified_memory;
  localparam int W = 256;
  logic clk = 0, mr = 0, mw = 0;
  logic [31:0] addr, wdata, rdata;
  logic [31:0] shadow [W];
  int checks = 0, failures = 0;

  unified_memory #(.WORDS(W)) dut (.clk, .addr, .mem_read(mr), .mem_write(mw), .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int i = 0; i < W; i++) begin
      addr = 32'(i * 4); wdata = $urandom; mw = 1; shadow[i] = wdata;
      @(posedge clk); #1;
    end
    mw = 0;
    for (int i = 0; i < 1000; i++) begin
      addr = {$urandom} & ~32'h3;
      mr = ($urandom % 4) != 0;
      mw = ($urandom % 3) == 0;
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== (mr ? shadow[(addr >> 2) % W] : 32'h0)) begin
        failures++;
        $display("FAIL addr=%h rdata=%h", addr, rdata);
      end
      @(posedge clk);
      if (mw) shadow[(addr >> 2) % W] = wdata;
      #1;
    end
    mw = 0; mr = 1;
    addr = 32'h8000_0180; #1;
    checks++;
    if (rdata !== shadow[8'h60]) begin failures++; $display("FAIL vector alias"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
