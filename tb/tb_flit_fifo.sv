// tb_flit_fifo: random push/pop traffic against a queue model.
//
// The writer and reader toggle their valid/ready at random, so the buffer
// runs empty and full. Every word read is compared with a reference queue,
// in_ready must be low exactly when DEPTH words are held, and out_valid
// exactly when at least one is.
module tb_flit_fifo;
  localparam int unsigned WIDTH = 16;
  localparam int unsigned DEPTH = 4;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             in_valid, in_ready, out_valid, out_ready;
  logic [WIDTH-1:0] in_data, out_data;

  int checks = 0;
  int failures = 0;
  int n_full = 0;
  int n_empty = 0;
  logic [WIDTH-1:0] model [$];

  flit_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    in_valid = 1'b0;
    out_ready = 1'b0;
    in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // phases: mostly-write, mostly-read, balanced
      in_valid  = ($urandom_range(0, 99) < ((i / 500) % 3 == 0 ? 80 : (i / 500) % 3 == 1 ? 20 : 50));
      out_ready = ($urandom_range(0, 99) < ((i / 500) % 3 == 0 ? 20 : (i / 500) % 3 == 1 ? 80 : 50));
      in_data   = WIDTH'($urandom);
      check(in_ready == (model.size() < DEPTH), $sformatf("in_ready with %0d held", model.size()));
      check(out_valid == (model.size() > 0), $sformatf("out_valid with %0d held", model.size()));
      if (model.size() == DEPTH) n_full++;
      if (model.size() == 0) n_empty++;
      if (out_valid && out_ready) begin
        check(out_data == model[0], $sformatf("data %h expected %h", out_data, model[0]));
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    check(n_full > 0, "buffer never full");
    check(n_empty > 0, "buffer never empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
