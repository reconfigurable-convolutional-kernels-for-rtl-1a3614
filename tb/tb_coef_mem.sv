// tb_coef_mem: self-checking test of the kernel memory.
// Checks reset to zero, random writes read back on all read ports against a
// shadow copy, ignored out-of-range writes, and zero for out-of-range reads.
module tb_coef_mem;
  localparam int unsigned N = 9, B = 8, R = 2;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [3:0] waddr = '0;
  logic [B-1:0] wdata = '0;
  logic [R-1:0][31:0] raddr = '0;
  logic [R-1:0][B-1:0] rdata;
  logic [B-1:0] model [N];
  int checks = 0, failures = 0;

  coef_mem #(.N(N), .B(B), .R(R)) dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr),
    .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int a = 0; a < N + 3; a++) begin
      for (int r = 0; r < R; r++) raddr[r] = 32'((a + r * 4) % (N + 3));
      #1;
      for (int r = 0; r < R; r++) begin
        checks++;
        if (rdata[r] !== ((raddr[r] < N) ? model[raddr[r]] : '0)) begin
          failures++;
          $display("read port %0d addr %0d got %h", r, raddr[r], rdata[r]);
        end
      end
    end
  endtask

  initial begin
    for (int n = 0; n < N; n++) model[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    read_all();
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 4'($urandom_range(0, 11)); wdata = B'($urandom);
      if (waddr < N) model[waddr] = wdata;
      @(negedge clk); we = 1'b0;
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
