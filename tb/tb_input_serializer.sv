// tb_input_serializer: checks that an accepted batch is streamed in phases
// 0 .. L-1 of the next period with every byte repeated C times, that zeros
// and batch_valid low follow when no batch is offered, and that in_ready is
// high only in the last cycle of a period.
module tb_input_serializer;
  import solar_pkg::*;
  localparam int N = 3, C = 4, L = N * C;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  phase_t phase;
  logic fill, pend, ready, bvalid, in_valid;
  data_t [N-1:0] in_data;
  data_t stream;

  routing_timer #(.L(L)) u_t (.clk(clk), .rst(rst), .phase_o(phase), .fill_o(fill), .period_end_o(pend));
  input_serializer #(.N(N), .C(C)) dut (
    .clk(clk), .rst(rst), .phase(phase), .period_end(pend), .in_data(in_data),
    .in_valid(in_valid), .in_ready(ready), .stream_o(stream), .batch_valid_o(bvalid));

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s phase=%0d stream=%0d", what, phase, stream); end
  endtask

  initial begin
    data_t [N-1:0] sent;
    rst = 1; in_valid = 0; in_data = '0;
    @(posedge clk); #1; rst = 0;
    for (int b = 0; b < 4; b++) begin
      // wait for the last cycle of the period
      while (!pend) begin chk(!ready, "ready outside period end"); @(posedge clk); #1; end
      chk(ready, "ready at period end");
      for (int i = 0; i < N; i++) sent[i] = 8'($urandom);
      in_data = sent; in_valid = (b != 2);
      @(posedge clk); #1;
      in_valid = 0; in_data = '0;
      for (int t = 0; t < 3 * L - 1; t++) begin
        chk(int'(phase) == t, "phase");
        if (t < L) chk(stream == ((b != 2) ? sent[t / C] : 8'd0), "stream value");
        else       chk(stream == 8'd0, "stream idle");
        chk(bvalid == (b != 2), "batch valid");
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
