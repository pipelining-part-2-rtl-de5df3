// pipe_reg_tb: checks load, stall (hold), bubble and reset of pipe_reg
// against a one-line reference model, with random controls.
module pipe_reg_tb;
  localparam logic [15:0] BUB = 16'hF00D;
  logic clk = 0, rst = 1, stall = 0, bubble = 0;
  logic [15:0] d = 0, q, model;
  int checks = 0, failures = 0;

  pipe_reg #(.T(logic [15:0]), .BUBBLE(BUB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_stall = 0, n_bubble = 0;
    @(negedge clk);
    @(negedge clk);
    checks++; if (q !== BUB) begin failures++; $display("FAIL reset value %h", q); end
    model = BUB;
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      int r;
      r = $urandom_range(0, 9);
      stall  = (r == 0 || r == 1);
      bubble = (r == 2);
      rst    = (r == 3 && $urandom_range(0, 9) == 0);
      d      = 16'($urandom);
      @(posedge clk);
      if (rst || bubble) model = BUB;
      else if (!stall) model = d;
      n_stall += stall; n_bubble += bubble;
      @(negedge clk);
      checks++;
      if (q !== model) begin failures++; $display("FAIL step %0d: q=%h model=%h", i, q, model); end
    end
    checks++; if (n_stall == 0 || n_bubble == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
