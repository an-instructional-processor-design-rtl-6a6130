// tb_io_ports: checks the memory-mapped ports. PORTA (address 62) reads the
// switch byte one clock after it is applied; PORTB (address 63) is written
// from the low byte of the write data and read back; other addresses pass
// the memory word and write enable through, and port addresses never write
// the memory.
module tb_io_ports;
  import ip_pkg::*;
  logic clk = 0, reset, mem_write, ram_write;
  logic [5:0]  addr;
  logic [15:0] wdata, ram_rdata, rdata;
  logic [7:0]  porta_in, portb_out, portb_model, porta_model;
  int checks = 0, failures = 0;

  io_ports dut (.clk, .reset, .addr, .mem_write, .wdata, .ram_rdata, .porta_in,
                .ram_write, .rdata, .portb_out);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; mem_write = 0; addr = 0; wdata = 0; ram_rdata = 0; porta_in = 8'hA5;
    @(posedge clk); #1; reset = 0;
    portb_model = 0; porta_model = 0;
    checks++; if (portb_out !== 0) begin failures++; $display("FAIL reset"); end
    repeat (800) begin
      case ($urandom % 4)
        0: addr = PORTA_ADDR;
        1: addr = PORTB_ADDR;
        default: addr = 6'($urandom % 62);
      endcase
      wdata = 16'($urandom); ram_rdata = 16'($urandom); mem_write = 1'($urandom);
      #1;
      checks++;
      if (addr == PORTA_ADDR) begin
        if (rdata !== {8'h00, porta_model} || ram_write !== 1'b0) begin
          failures++; $display("FAIL porta rd %h exp %h", rdata, porta_model);
        end
      end else if (addr == PORTB_ADDR) begin
        if (rdata !== {8'h00, portb_model} || ram_write !== 1'b0) begin
          failures++; $display("FAIL portb rd %h", rdata);
        end
      end else if (rdata !== ram_rdata || ram_write !== mem_write) begin
        failures++; $display("FAIL ram pass %h", rdata);
      end
      @(posedge clk);
      porta_model = porta_in;
      if (mem_write && addr == PORTB_ADDR) portb_model = wdata[7:0];
      #1;
      porta_in = 8'($urandom);
      checks++; if (portb_out !== portb_model) begin failures++; $display("FAIL portb %h exp %h", portb_out, portb_model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
