// tb_controller: checks the phase sequence of every operation, the cycle
// count from the accepting edge to done (5, 20, 23, 18), that busy stays high
// until done, that start is ignored while busy and that a start given in the
// done cycle is accepted.
module tb_controller;
  import unipro_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  op_e        op = OP_DFP_ADD;
  phase_e     phase;
  op_e        cur_op;
  logic [4:0] iter;
  logic       busy, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  controller dut (.clk, .rst_n, .start, .op, .phase, .cur_op, .iter, .busy, .done);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected phase after each edge, starting with the accepting edge
  function automatic void expected(input op_e o, ref phase_e seq[$]);
    seq = {};
    case (o)
      OP_DFP_MUL: begin
        seq.push_back(PH_INIT);
        repeat (16) seq.push_back(PH_ITER);
        seq.push_back(PH_CPA); seq.push_back(PH_NRES);
      end
      OP_BFP_DIV: begin
        seq.push_back(PH_INIT);
        repeat (15) seq.push_back(PH_ITER);
        seq.push_back(PH_CPA);
      end
      OP_DFP_DIV: begin
        seq.push_back(PH_NORM1); seq.push_back(PH_NORM2); seq.push_back(PH_INIT);
        repeat (18) seq.push_back(PH_ITER);
        seq.push_back(PH_CPA);
      end
      default: begin
        seq.push_back(PH_NORM1); seq.push_back(PH_NORM2); seq.push_back(PH_ITER);
        seq.push_back(PH_CPA);
      end
    endcase
    seq.push_back(PH_ROUND);
    seq.push_back(PH_IDLE);
  endfunction

  task automatic run(input op_e o, input int want_lat);
    phase_e seq[$];
    int lat;
    expected(o, seq);
    @(negedge clk);
    op = o; start = 1'b1;
    lat = 0;
    foreach (seq[i]) begin
      @(posedge clk);
      @(negedge clk);
      start = (i == 2) ? 1'b1 : 1'b0;    // a start while busy must be ignored
      op    = OP_DFP_MUL;
      checks++;
      if (phase != seq[i] || (i < seq.size() - 1 && !busy) || cur_op != o) begin
        failures++;
        $display("FAIL %s step %0d phase %s want %s", o.name(), i, phase.name(), seq[i].name());
      end
      if (done) lat = i;
    end
    start = 1'b0;
    checks++;
    if (lat != want_lat) begin
      failures++;
      $display("FAIL %s latency %0d want %0d", o.name(), lat, want_lat);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(OP_DFP_ADD, 5);
    run(OP_DFP_SUB, 5);
    run(OP_DFP_MUL, 20);
    run(OP_DFP_DIV, 23);
    run(OP_BFP_DIV, 18);
    // start in the cycle where done is high
    @(negedge clk); op = OP_DFP_ADD; start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    start = 1'b1; op = OP_BFP_DIV;
    @(negedge clk); start = 1'b0;
    checks++;
    if (phase != PH_INIT || cur_op != OP_BFP_DIV) begin
      failures++;
      $display("FAIL back-to-back start not accepted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
