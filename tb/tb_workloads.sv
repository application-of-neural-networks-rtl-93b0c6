// tb_workloads: the test-set workloads of the classifier.
//
// Runs 200 feature vectors (the size of the face test set) through
//   - the PCA-features network, 39-28-6, one nonzero digit dropped (default),
//   - the LDA-features network, 39-29-6, one nonzero digit dropped,
// and 60 vectors through the PCA network with four nonzero digits dropped,
// the most reduced configuration. Every output and its latency is checked
// against the reference network. Weights are random: the trained weights
// are not available, so recognition accuracy is not measured.
module tb_workloads;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done_pca, done_lda, done_d4;
  int   c_pca, f_pca, c_lda, f_lda, c_d4, f_d4;

  nn_workload_runner #(.N_HID(28), .NZ_DROP(1), .N_VEC(200)) u_pca (
    .clk, .done(done_pca), .checks(c_pca), .failures(f_pca));
  nn_workload_runner #(.N_HID(29), .NZ_DROP(1), .N_VEC(200)) u_lda (
    .clk, .done(done_lda), .checks(c_lda), .failures(f_lda));
  nn_workload_runner #(.N_HID(28), .NZ_DROP(4), .N_VEC(60)) u_d4 (
    .clk, .done(done_d4), .checks(c_d4), .failures(f_d4));

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c_pca + c_lda + c_d4, f_pca + f_lda + f_d4 + 1);
    $finish;
  end

  initial begin
    wait (done_pca && done_lda && done_d4);
    repeat (2) @(posedge clk);
    $display("PCA-NN 39-28-6 drop 1: %0d checks, %0d failures", c_pca, f_pca);
    $display("LDA-NN 39-29-6 drop 1: %0d checks, %0d failures", c_lda, f_lda);
    $display("PCA-NN 39-28-6 drop 4: %0d checks, %0d failures", c_d4, f_d4);
    $display("TB_RESULT checks=%0d failures=%0d", c_pca + c_lda + c_d4, f_pca + f_lda + f_d4);
    $finish;
  end

endmodule
