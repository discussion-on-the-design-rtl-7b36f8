// tb_arith_unit: random signed additions, multiplications and divisions on
// a 48-bit unit, compared with the language's own operators (division
// truncating toward zero), division by zero, and the cycle counts: one
// cycle for ADD/MUL, W+1 cycles from start to done for DIV.
module tb_arith_unit;
  import cnn_pkg::*;

  localparam int W = 48;
  typedef logic signed [W-1:0] word_t;

  logic      clk = 0, rst_n = 0;
  logic      start, busy, done, div_zero;
  arith_op_e op;
  word_t     a, b, result;
  int        checks = 0, failures = 0;
  int        n_div = 0;

  arith_unit #(.W(W)) dut (.clk, .rst_n, .start, .op, .a, .b, .busy, .done, .result, .div_zero);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t rnd();
    word_t v = word_t'({$urandom, $urandom});
    return v >>> $urandom_range(W - 2);
  endfunction

  task automatic run(input arith_op_e o, input word_t x, input word_t y);
    automatic word_t e;
    automatic int cyc = 0;
    automatic int exp_cyc;
    automatic logic ez = 0;
    case (o)
      OP_ADD: begin e = x + y; exp_cyc = 1; end
      OP_MUL: begin e = x * y; exp_cyc = 1; end
      default: begin
        if (y == 0) begin e = {1'b0, {(W-1){1'b1}}}; ez = 1; exp_cyc = 1; end
        else begin e = x / y; exp_cyc = W + 1; end
      end
    endcase
    @(negedge clk);
    start = 1; op = o; a = x; b = y;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    checks += 2;
    if (result != e || div_zero != ez) begin
      failures++; $display("FAIL op=%0d a=%0d b=%0d got %0d exp %0d", o, x, y, result, e);
    end
    if (cyc != exp_cyc) begin failures++; $display("FAIL op=%0d took %0d cycles, exp %0d", o, cyc, exp_cyc); end
  endtask

  initial begin
    start = 0; op = OP_ADD; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      run(OP_ADD, rnd(), rnd());
      run(OP_MUL, rnd(), rnd());
      run(OP_DIV, rnd(), rnd());
    end
    run(OP_DIV, 48'sd12345, 48'sd0);
    run(OP_DIV, -48'sd7, 48'sd2);
    run(OP_DIV, 48'sd7, -48'sd2);
    run(OP_DIV, -48'sd100, -48'sd10);
    // a start while a division runs is ignored
    @(negedge clk); start = 1; op = OP_DIV; a = 48'sd1000; b = 48'sd3;
    @(negedge clk); start = 1; op = OP_ADD; a = 48'sd1; b = 48'sd1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (result != 48'sd333) begin failures++; $display("FAIL start during busy: %0d", result); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
