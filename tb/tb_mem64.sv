// tb_mem64: checks the 64 x 16 memory. It is first read back after loading
// the default program image (the word at address 0 and the delay constant at
// address 32 are known), then random writes and reads are compared with a
// model array; reads are combinational.
module tb_mem64;
  logic clk = 0, mem_write;
  logic [5:0]  addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [64];
  int checks = 0, failures = 0;

  mem64 #(.INIT_FILE("rtl/led_demo.hex")) dut (.clk, .addr, .mem_write, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem_write = 0; wdata = 0;
    addr = 0; #1;
    checks++; if (rdata !== 16'h10C1) begin failures++; $display("FAIL init[0] %h", rdata); end
    addr = 32; #1;
    checks++; if (rdata !== 16'h7FFF) begin failures++; $display("FAIL init[32] %h", rdata); end
    addr = 40; #1;
    checks++; if (rdata !== 16'h0000) begin failures++; $display("FAIL init[40] %h", rdata); end
    // fill every word
    for (int k = 0; k < 64; k++) begin
      addr = 6'(k); wdata = 16'($urandom); mem_write = 1;
      @(posedge clk); model[k] = wdata; #1;
    end
    mem_write = 0;
    repeat (600) begin
      addr = 6'($urandom); wdata = 16'($urandom); mem_write = 1'($urandom);
      #1;
      checks++; if (rdata !== model[addr]) begin failures++; $display("FAIL rd %0d %h exp %h", addr, rdata, model[addr]); end
      @(posedge clk); if (mem_write) model[addr] = wdata; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
