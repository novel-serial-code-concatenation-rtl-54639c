// tb_frame_buffer: self-checking testbench for the frame memory. It writes a
// pseudo-random pattern to every address, reads it back checking the
// one-cycle read latency, rewrites a few locations and checks that reads
// return the new values while the neighbouring words keep theirs.
module tb_frame_buffer;
  localparam int WIDTH = 4, DEPTH = 1000;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             we = 1'b0;
  logic [AW-1:0]    waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  frame_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0;
  int failures = 0;
  logic [WIDTH-1:0] model [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = WIDTH'($urandom);
      we    <= 1'b1;
      waddr <= AW'(a);
      wdata <= model[a];
      @(posedge clk);
    end
    we <= 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr <= AW'(a);
      @(posedge clk);   // address sampled here
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", a, rdata, model[a]);
      end
    end
    for (int k = 0; k < 20; k++) begin
      int a;
      a = int'($urandom % DEPTH);
      model[a] = ~model[a];
      we    <= 1'b1;
      waddr <= AW'(a);
      wdata <= model[a];
      @(posedge clk);
    end
    we <= 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr <= AW'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL: pass 2 addr %0d read %h expected %h", a, rdata, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
