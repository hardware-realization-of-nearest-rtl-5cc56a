// tb_nns_table1: runs the engine in each of the twelve size combinations of
// the reference resource table (coordinate width 8..32 bits, 7..63 tree
// nodes, 50..200 points, 2..5 dimensions) side by side, every one against a
// brute-force search over random trees and queries.
//   tree nodes 7/15/31/63 -> DEPTH 3/4/5/6
//   points 50/100/200     -> AW 6/7/8 (a memory of 64/128/256 words)
module tb_nns_table1;
  localparam int N = 12;
  bit done [N];
  int c [N], f [N];
  int checks = 0, failures = 0;

  //                 W   K  AW DEPTH  NP
  nns_config_check #( 8, 3, 7, 5, 100) i0  (.done(done[0]),  .checks(c[0]),  .failures(f[0]));
  nns_config_check #(16, 3, 7, 5, 100) i1  (.done(done[1]),  .checks(c[1]),  .failures(f[1]));
  nns_config_check #(24, 3, 7, 5, 100) i2  (.done(done[2]),  .checks(c[2]),  .failures(f[2]));
  nns_config_check #(32, 3, 7, 5, 100) i3  (.done(done[3]),  .checks(c[3]),  .failures(f[3]));
  nns_config_check #(16, 3, 7, 3, 100) i4  (.done(done[4]),  .checks(c[4]),  .failures(f[4]));
  nns_config_check #(16, 3, 7, 4, 100) i5  (.done(done[5]),  .checks(c[5]),  .failures(f[5]));
  nns_config_check #(16, 3, 7, 6, 100) i6  (.done(done[6]),  .checks(c[6]),  .failures(f[6]));
  nns_config_check #(16, 3, 6, 5,  50) i7  (.done(done[7]),  .checks(c[7]),  .failures(f[7]));
  nns_config_check #(16, 3, 8, 5, 200) i8  (.done(done[8]),  .checks(c[8]),  .failures(f[8]));
  nns_config_check #(16, 2, 7, 5, 100) i9  (.done(done[9]),  .checks(c[9]),  .failures(f[9]));
  nns_config_check #(16, 4, 7, 5, 100) i10 (.done(done[10]), .checks(c[10]), .failures(f[10]));
  nns_config_check #(16, 5, 7, 5, 100) i11 (.done(done[11]), .checks(c[11]), .failures(f[11]));

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      #1us;
      all = 1;
      for (int i = 0; i < N; i++) all &= done[i];
    end while (!all);
    for (int i = 0; i < N; i++) begin
      checks += c[i];
      failures += f[i];
      $display("configuration %0d: %0d checks, %0d failures", i, c[i], f[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
