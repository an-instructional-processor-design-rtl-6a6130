// tb_step_counter: checks that the step counter counts T0..T7 and wraps,
// returns to T0 on clear, freezes for good on stop until reset, and that
// reset returns to T0 with halted low.
module tb_step_counter;
  logic clk = 0, reset, clear, stop, halted;
  logic [2:0] step, model;
  logic model_h;
  int checks = 0, failures = 0;

  step_counter dut (.clk, .reset, .clear, .stop, .step, .halted);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick;
    @(posedge clk);
    if (reset) begin model = 0; model_h = 0; end
    else if (model_h) ;
    else if (clear) model = 0;
    else if (stop) model_h = 1;
    else model = model + 1;
    #1;
    checks++;
    if (step !== model || halted !== model_h) begin
      failures++; $display("FAIL step=%0d exp %0d halted=%b exp %b", step, model, halted, model_h);
    end
  endtask

  initial begin
    reset = 1; clear = 0; stop = 0;
    tick();
    reset = 0;
    repeat (10) tick();             // free count with wrap
    clear = 1; tick(); clear = 0;   // back to T0
    repeat (3) tick();
    stop = 1; tick(); stop = 0;     // halt
    repeat (5) tick();              // frozen
    checks++; if (!halted) begin failures++; $display("FAIL not halted"); end
    repeat (400) begin
      reset = ($urandom % 40) == 0; clear = ($urandom % 5) == 0; stop = ($urandom % 30) == 0;
      tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
