// tb_weight_mem: writes random words to random addresses of a 25 x 16
// memory, reads every address back against a shadow copy, checks the
// one-cycle read latency and that a read colliding with a write returns the
// old word.
module tb_weight_mem;
  localparam int DEPTH = 25, WIDTH = 16;

  logic clk = 0;
  logic we;
  logic [4:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  weight_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 5'(i); wdata = WIDTH'($urandom); shadow[i] = wdata;
    end
    for (int t = 0; t < 2000; t++) begin
      automatic int ra = $urandom_range(DEPTH - 1);
      automatic logic [WIDTH-1:0] e = shadow[ra];
      @(negedge clk);
      we = $urandom_range(1); waddr = 5'($urandom_range(DEPTH - 1)); wdata = WIDTH'($urandom);
      if ($urandom_range(4) == 0) waddr = 5'(ra);   // collision
      raddr = 5'(ra);
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
      we = 0;
      checks++;
      if (rdata !== e) begin failures++; $display("FAIL addr %0d got %h exp %h", ra, rdata, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
