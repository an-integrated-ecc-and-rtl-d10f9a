// tb_table1_configs: runs the memory wrapper at each memory size of the
// hardware-overhead study, all with 8 spare rows and 4 spare columns:
// 32K x 32, 32K x 64, 32K x 128, 16K x 64 and 8K x 128. Each size runs the
// production-test / field-repair sequence of table1_case concurrently.
module tb_table1_configs;
  int checks = 0, failures = 0;
  logic d [5];
  int c [5], f [5];

  table1_case #(.DW(32),  .AW(15)) u_32k_32  (.done(d[0]), .checks(c[0]), .failures(f[0]));
  table1_case #(.DW(64),  .AW(15)) u_32k_64  (.done(d[1]), .checks(c[1]), .failures(f[1]));
  table1_case #(.DW(128), .AW(15)) u_32k_128 (.done(d[2]), .checks(c[2]), .failures(f[2]));
  table1_case #(.DW(64),  .AW(14)) u_16k_64  (.done(d[3]), .checks(c[3]), .failures(f[3]));
  table1_case #(.DW(128), .AW(13)) u_8k_128  (.done(d[4]), .checks(c[4]), .failures(f[4]));

  initial begin
    #20ms;
    for (int i = 0; i < 5; i++) begin checks += c[i]; failures += f[i]; end
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    for (int i = 0; i < 5; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
