// tb_lbp_workloads - the classifier at the sizes of the ten evaluated data
// sets (elements, features, classes and k of each), with synthetic contents.
// Each size runs in its own instance of lbp_workload_run, all in parallel;
// the bench ends when all have finished.
module tb_lbp_workloads;
  localparam int N = 10;
  bit fin [N];
  int ch [N], fl [N];

  lbp_workload_run #(.NAME("Pima"),     .E(768),   .F(8),   .NC(2), .K(19)) w0 (fin[0], ch[0], fl[0]);
  lbp_workload_run #(.NAME("Sonar"),    .E(208),   .F(60),  .NC(2), .K(3))  w1 (fin[1], ch[1], fl[1]);
  lbp_workload_run #(.NAME("Banknote"), .E(1372),  .F(4),   .NC(2), .K(7))  w2 (fin[2], ch[2], fl[2]);
  lbp_workload_run #(.NAME("Phishing"), .E(2456),  .F(30),  .NC(2), .K(5))  w3 (fin[3], ch[3], fl[3]);
  lbp_workload_run #(.NAME("Iris"),     .E(150),   .F(4),   .NC(3), .K(5))  w4 (fin[4], ch[4], fl[4]);
  lbp_workload_run #(.NAME("Forest"),   .E(325),   .F(27),  .NC(4), .K(9))  w5 (fin[5], ch[5], fl[5]);
  lbp_workload_run #(.NAME("Mice"),     .E(1080),  .F(80),  .NC(8), .K(3))  w6 (fin[6], ch[6], fl[6]);
  lbp_workload_run #(.NAME("CNAE-9"),   .E(1080),  .F(856), .NC(9), .K(7), .NQ(1)) w7 (fin[7], ch[7], fl[7]);
  lbp_workload_run #(.NAME("Cervical"), .E(858),   .F(36),  .NC(2), .K(5))  w8 (fin[8], ch[8], fl[8]);
  lbp_workload_run #(.NAME("Nursery"),  .E(12960), .F(8),   .NC(5), .K(17)) w9 (fin[9], ch[9], fl[9]);

  int checks, failures;

  initial begin
    #80_000_000;
    checks = 0; failures = 1;
    for (int i = 0; i < N; i++) begin checks += ch[i]; failures += fl[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      #1000;
      all = 1;
      for (int i = 0; i < N; i++) all &= fin[i];
    end while (!all);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin checks += ch[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
