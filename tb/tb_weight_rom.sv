// tb_weight_rom: checks the hidden-layer weight store at its default size
// (39 x 18): every word written is read back asynchronously, a write to one
// address leaves the others unchanged, and out-of-range reads return zero.
module tb_weight_rom;

  localparam int DEPTH = 39, W = 18;

  logic clk = 1'b0;
  logic we = 1'b0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [DEPTH];

  weight_rom dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic write(int a, logic [W-1:0] d);
    @(negedge clk);
    we = 1'b1; waddr = 6'(a); wdata = d;
    @(negedge clk);
    we = 1'b0;
    model[a] = d;
  endtask

  task automatic read_all();
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 6'(a);
      #1;
      checks++;
      if (rdata != model[a]) begin
        failures++;
        $display("addr %0d: got %h expected %h", a, rdata, model[a]);
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
    for (int a = 0; a < DEPTH; a++) write(a, W'($urandom));
    read_all();
    for (int k = 0; k < 20; k++) write(int'($urandom_range(0, DEPTH - 1)), W'($urandom));
    read_all();
    raddr = 6'd50;
    #1;
    checks++;
    if (rdata != '0) begin
      failures++;
      $display("out-of-range read gave %h", rdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
