// tb_cfg_mem: self-checking test of the configuration memory at its default
// size (128 words, here 32 bits wide). Fills every word with a value derived
// from its address, reads them back in random order with en = 1, checks that
// en = 0 reads as zero (the NOP context), and rewrites some words.
module tb_cfg_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we, en;
  logic [6:0]  waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [128];

  cfg_mem dut (.clk, .we, .waddr, .wdata, .en, .raddr, .rdata);

  function automatic logic [31:0] pattern(input int a, input int k);
    return 32'h9E37_79B9 * (a + 1) ^ (k << 24);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; en = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < 128; a++) begin
      @(negedge clk);
      we = 1; waddr = 7'(a); wdata = pattern(a, 0); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 1; k < 4; k++) begin
      for (int n = 0; n < 300; n++) begin
        @(negedge clk);
        en = (n % 5 != 0);
        raddr = $urandom_range(0, 127);
        // write one random word while reading
        we = (n % 3 == 0); waddr = $urandom_range(0, 127); wdata = pattern(waddr, k);
        #1;
        checks++;
        if (rdata !== (en ? model[raddr] : 32'h0)) begin
          failures++;
          $display("FAIL addr %0d en %b: got %h expected %h", raddr, en, rdata, en ? model[raddr] : 32'h0);
        end
        @(posedge clk);
        if (we) model[waddr] = wdata;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
