// tb_pixel_delay: checks the storage register at the default length (one
// pixel register) and at lengths that select the flip-flop chain (3) and the
// circular buffer (5 and 37).  Random words are written every clock; each
// output must equal the input LEN clocks earlier, and zero during the first
// LEN clocks after reset (empty store).
module tb_pixel_delay;
  localparam int NCYC = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [15:0] din;
  logic [15:0] d1, d3, d5, d37;
  logic [15:0] h [NCYC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pixel_delay                u1  (.clk(clk), .rst_n(rst_n), .din(din), .dout(d1));
  pixel_delay #(.LEN(3))     u3  (.clk(clk), .rst_n(rst_n), .din(din), .dout(d3));
  pixel_delay #(.LEN(5))     u5  (.clk(clk), .rst_n(rst_n), .din(din), .dout(d5));
  pixel_delay #(.LEN(37))    u37 (.clk(clk), .rst_n(rst_n), .din(din), .dout(d37));

  task automatic chk(input logic [15:0] got, input int n, input int len);
    logic [15:0] exp;
    exp = (n - len >= 0) ? h[n - len] : '0;
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("LEN %0d cycle %0d: got %h expected %h", len, n, got, exp);
    end
  endtask

  initial begin
    din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      // outputs now reflect inputs applied up to cycle n-1
      chk(d1, n, 1);
      chk(d3, n, 3);
      chk(d5, n, 5);
      chk(d37, n, 37);
      din = 16'($urandom);
      h[n] = din;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
