// tb_tirex_data_mem: self-checking testbench of a tile's data cache.
//
// Writes random 32-bit words with random byte strobes (keeping a byte-level
// copy in the testbench), first filling the whole 16 KiB so every byte is
// defined, then mixes writes with reads. A read of word address a returns,
// one clock later, the NRD consecutive words a, a+1, ... (wrapping past the
// last word), which is what the data buffer needs to cut its window.
// Timing: read data checked one edge after the address; watchdog 100000
// cycles. The document only says the memory is private block RAM; the
// three-word read is this design's.
`timescale 1ns/1ps
module tb_tirex_data_mem;
  localparam int BYTES = 16384;
  localparam int WORDS = BYTES / 4;
  localparam int NRD   = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        we = 1'b0;
  logic [11:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0;
  logic [3:0]  wstrb = '0;
  logic [NRD-1:0][31:0] rdata;

  tirex_data_mem dut (.clk, .we, .waddr, .wdata, .wstrb, .raddr, .rdata);

  int checks = 0, failures = 0;
  logic [31:0] model [WORDS];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 12'(a); wdata = $urandom; wstrb = 4'hF;
      model[a] = wdata;
    end
    for (int n = 0; n < 5000; n++) begin
      logic [11:0] ra;
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1);
      waddr = 12'($urandom); wdata = $urandom; wstrb = 4'($urandom);
      ra = ($urandom_range(0, 7) == 0) ? 12'(WORDS - 1 - $urandom_range(0, 1)) : 12'($urandom);
      raddr = ra;
      @(posedge clk);
      // the read samples the memory before this edge's write
      begin
        logic [31:0] exp [NRD];
        for (int r = 0; r < NRD; r++) exp[r] = model[12'(ra + 12'(r))];
        if (we)
          for (int b = 0; b < 4; b++) if (wstrb[b]) model[waddr][8*b +: 8] = wdata[8*b +: 8];
        #1;
        for (int r = 0; r < NRD; r++)
          check(rdata[r] == exp[r], $sformatf("read word %0d + %0d", ra, r));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
