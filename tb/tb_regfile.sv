// tb_regfile: self-checking test of the multi-ported register file in its
// global DRF configuration (64 x 32, 12 read / 4 write ports, the module's
// defaults) and its local PRF configuration (16 x 1, 1 / 1).
// A shadow array in the testbench models the contents: random writes on
// all ports (with colliding addresses, where the highest port must win)
// and random reads are compared every cycle, including read-before-write
// in the cycle of a write and the cleared state after reset.
module tb_regfile;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0][5:0]  raddr;
  logic [11:0][31:0] rdata;
  logic [3:0]        we;
  logic [3:0][5:0]   waddr;
  logic [3:0][31:0]  wdata;
  logic [31:0]       shadow [64];

  logic [3:0] pra, pwa;
  logic       prd, pwe, pwd;
  logic       pshadow [16];

  regfile dut (.clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata);
  regfile #(.WIDTH(1), .DEPTH(16), .NREAD(1), .NWRITE(1)) dut_p (
    .clk, .rst_n, .raddr(pra), .rdata(prd), .we(pwe), .waddr(pwa), .wdata(pwd));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; pwe = 0; raddr = '0; waddr = '0; wdata = '0; pra = 0; pwa = 0; pwd = 0;
    for (int i = 0; i < 64; i++) shadow[i] = '0;
    for (int i = 0; i < 16; i++) pshadow[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 12; p++) raddr[p] = $urandom_range(0, 63);
      for (int p = 0; p < 4; p++) begin
        we[p]    = $urandom_range(0, 1);
        waddr[p] = (n % 3 == 0) ? 6'(n % 8) : 6'($urandom_range(0, 63));
        wdata[p] = $urandom;
      end
      pra = $urandom_range(0, 15); pwa = $urandom_range(0, 15);
      pwe = $urandom_range(0, 1);  pwd = $urandom_range(0, 1);
      #1;
      for (int p = 0; p < 12; p++) begin
        checks++;
        if (rdata[p] !== shadow[raddr[p]]) begin
          failures++;
          $display("FAIL drf port %0d addr %0d: got %h expected %h", p, raddr[p], rdata[p], shadow[raddr[p]]);
        end
      end
      checks++;
      if (prd !== pshadow[pra]) begin
        failures++;
        $display("FAIL prf addr %0d: got %b expected %b", pra, prd, pshadow[pra]);
      end
      @(posedge clk);
      for (int p = 0; p < 4; p++) if (we[p]) shadow[waddr[p]] = wdata[p];
      if (pwe) pshadow[pwa] = pwd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
