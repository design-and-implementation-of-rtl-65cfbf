// Self-checking testbench for dds_phase_acc.
// Drives random and fixed frequency codes, keeps its own modulo-2^24 phase
// and compares it with the accumulator every clock. Also checks that the
// asynchronous clear acts without a clock edge, and that the phase wraps.
module tb_dds_phase_acc;

  localparam int unsigned ACC_W = 24;

  logic             clk = 1'b0;
  logic             rst;
  logic [ACC_W-1:0] code_f;
  logic [ACC_W-1:0] phase;

  int checks = 0, failures = 0, wraps = 0;
  longint unsigned model;          // independent wide model, reduced on compare

  dds_phase_acc dut (.clk(clk), .rst(rst), .code_f(code_f), .phase(phase));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: phase=%0d model=%0d", what, phase, model % (64'd1 << ACC_W));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; code_f = '0;
    #12;
    check(phase == '0, "reset clears");
    @(negedge clk) rst = 1'b0;
    model = 0;
    // 100 kHz carrier code, then random codes incl. large ones that wrap often
    for (int i = 0; i < 3000; i++) begin
      longint unsigned prev_ph;
      code_f = (i < 1000) ? 24'd33554 : ((i < 2000) ? 24'($urandom) : 24'hFFFFFF - 24'(i));
      prev_ph = model % (64'd1 << ACC_W);
      @(posedge clk);
      model = model + code_f;
      if ((model % (64'd1 << ACC_W)) < prev_ph) wraps++;
      @(negedge clk);
      check(phase == ACC_W'(model % (64'd1 << ACC_W)), "accumulate");
    end
    // asynchronous clear between clock edges
    #1 rst = 1'b1;
    #1 check(phase == '0, "async clear");
    @(negedge clk) rst = 1'b0;
    check(wraps > 10, "phase wrapped");
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
