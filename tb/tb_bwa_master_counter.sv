// tb_bwa_master_counter -- self-checking test of one bus usage counter.
//
// A 4-bit counter is driven with random increment and rescale pulses; the
// rescale is raised whenever the counter is full, as the arbiter does. A
// model count is kept in the testbench and compared every cycle, together
// with the `full` flag. Directed steps first check reset, a plain count of
// 5 and a rescale from 15+1 to 8.
module tb_bwa_master_counter;

  localparam int CNT_W = 4;

  logic             clk;
  logic             rst_n;
  logic             inc;
  logic             halve;
  logic [CNT_W-1:0] count;
  logic             full;

  int checks = 0;
  int failures = 0;
  int model = 0;

  bwa_master_counter #(.CNT_W(CNT_W)) dut (
    .clk(clk), .rst_n(rst_n), .inc(inc), .halve(halve),
    .count(count), .full(full)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic step(input bit i, input bit h);
    inc = i;
    halve = h;
    @(posedge clk);
    #1;
    if (h) model = (model + int'(i)) / 2;
    else   model = model + int'(i);
    check("count", int'(count), model);
    check("full", int'(full), int'(model == (1 << CNT_W) - 1));
  endtask

  initial begin
    rst_n = 1'b0;
    inc = 1'b1;
    halve = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check("reset", int'(count), 0);
    rst_n = 1'b1;
    model = 0;
    repeat (5) step(1'b1, 1'b0);
    check("five", int'(count), 5);
    step(1'b0, 1'b0);
    check("hold", int'(count), 5);
    while (!full) step(1'b1, 1'b0);
    check("full at 15", int'(count), 15);
    step(1'b1, 1'b1);
    check("rescale 16/2", int'(count), 8);
    for (int k = 0; k < 2000; k++) begin
      bit i;
      i = 1'($urandom_range(0, 99) < 70);
      step(i, full | ($urandom_range(0, 99) < 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
