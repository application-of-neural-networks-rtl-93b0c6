// tb_weight_bank: checks the output-neuron coefficient store at its default
// size (28 words): all words are visible at once after loading, and a
// rewrite of one word changes only that word.
module tb_weight_bank;

  localparam int DEPTH = 28, W = 18;

  logic clk = 1'b0;
  logic we = 1'b0;
  logic [4:0] waddr = '0;
  logic [W-1:0] wpos = '0, wneg = '0;
  logic [W-1:0] pos [DEPTH];
  logic [W-1:0] neg [DEPTH];
  logic [W-1:0] mp [DEPTH];
  logic [W-1:0] mn [DEPTH];

  weight_bank dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic write(int a, logic [W-1:0] p, logic [W-1:0] n);
    @(negedge clk);
    we = 1'b1; waddr = 5'(a); wpos = p; wneg = n;
    @(negedge clk);
    we = 1'b0;
    mp[a] = p;
    mn[a] = n;
  endtask

  task automatic compare();
    for (int a = 0; a < DEPTH; a++) begin
      checks++;
      if (pos[a] != mp[a] || neg[a] != mn[a]) begin
        failures++;
        $display("word %0d: got %h/%h expected %h/%h", a, pos[a], neg[a], mp[a], mn[a]);
      end
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) write(a, W'($urandom), W'($urandom));
    compare();
    for (int k = 0; k < 30; k++)
      write(int'($urandom_range(0, DEPTH - 1)), W'($urandom), W'($urandom));
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
