// tb_ring_noc_sizes: runs the ring NoC at every network size of the
// evaluation range, 2, 4, 8, 16, 32, 64, 128 and 256 nodes, each with
// 256-bit data, side by side. Each size gets random transfers checked for
// data, destination register and hop latency (see noc_size_run). A ninth
// instance is the 8-node octagon, with cross links.
module tb_ring_noc_sizes;
  logic clk = 0;
  logic [8:0] done;
  int c [9];
  int f [9];
  int checks, failures;

  always #5 clk = ~clk;

  noc_size_run #(.NODES(2))   r2   (.clk(clk), .done(done[0]), .checks(c[0]), .failures(f[0]));
  noc_size_run #(.NODES(4))   r4   (.clk(clk), .done(done[1]), .checks(c[1]), .failures(f[1]));
  noc_size_run #(.NODES(8))   r8   (.clk(clk), .done(done[2]), .checks(c[2]), .failures(f[2]));
  noc_size_run #(.NODES(16))  r16  (.clk(clk), .done(done[3]), .checks(c[3]), .failures(f[3]));
  noc_size_run #(.NODES(32))  r32  (.clk(clk), .done(done[4]), .checks(c[4]), .failures(f[4]));
  noc_size_run #(.NODES(64))  r64  (.clk(clk), .done(done[5]), .checks(c[5]), .failures(f[5]));
  noc_size_run #(.NODES(128)) r128 (.clk(clk), .done(done[6]), .checks(c[6]), .failures(f[6]));
  noc_size_run #(.NODES(256)) r256 (.clk(clk), .done(done[7]), .checks(c[7]), .failures(f[7]));
  // The 8-node octagon: ring plus cross links, at most 2 hops.
  noc_size_run #(.NODES(8), .CROSS(1)) roct (.clk(clk), .done(done[8]), .checks(c[8]), .failures(f[8]));

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < 9; i++) begin
      checks += c[i];
      failures += f[i];
    end
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    total();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done == 9'h1FF);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
