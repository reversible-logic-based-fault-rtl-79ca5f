// tb_ftra_qca: check of the clocked QCA FTRA.
// 1. Latency: after reset a single vector is applied for one clock and the
//    outputs are watched; the expected vector must appear exactly 12 clocks
//    later and not before.
// 2. Throughput: all 32 vectors, then 200 random ones, are streamed one per
//    clock and every output is compared with the truth table 12 clocks on.
module tb_ftra_qca;
  import ftra_ref_pkg::*;

  localparam int ZONES = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] in_v, out_v;
  int checks = 0, failures = 0, cycle = 0;
  logic [4:0] hist [$];

  ftra_qca #(.ZONES(ZONES)) dut (
    .clk(clk), .rst_n(rst_n),
    .a(in_v[4]), .b(in_v[3]), .c(in_v[2]), .d(in_v[1]), .e(in_v[0]),
    .p(out_v[4]), .q(out_v[3]), .r(out_v[2]), .s(out_v[1]), .t(out_v[0])
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    wait (cycle == 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen_at;
    in_v = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Latency: 11111 gives a nonzero output vector, distinct from reset.
    in_v = 5'b11111;
    @(posedge clk);
    #1 in_v = '0;
    seen_at = -1;
    for (int k = 1; k <= 2 * ZONES; k++) begin
      if (seen_at < 0 && out_v == ftra_ref(5'b11111)) seen_at = k;
      @(posedge clk);
      #1;
    end
    checks++;
    if (seen_at != ZONES) begin
      failures++;
      $display("FAIL latency %0d zones, expected %0d", seen_at, ZONES);
    end
    // Streaming.
    for (int i = 0; i < 32 + 200 + ZONES; i++) begin
      if (i < 32) in_v = 5'(i);
      else in_v = 5'($urandom_range(0, 31));
      hist.push_back(in_v);
      @(posedge clk);
      #1;
      if (hist.size() >= ZONES) begin
        logic [4:0] old;
        old = hist.pop_front();
        checks++;
        if (out_v !== ftra_ref(old)) begin
          failures++;
          $display("FAIL in=%05b out=%05b exp=%05b", old, out_v, ftra_ref(old));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
