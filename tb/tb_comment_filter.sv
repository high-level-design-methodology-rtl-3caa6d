// tb_comment_filter: self-checking test of the comment-filter state machine.
// Streams C fragments through the filter and compares the flag of every
// character with an expected mask written by hand ('1' = in comment), then
// checks that ch_valid low holds the state.
module tb_comment_filter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n;
  logic ch_valid;
  logic [7:0] ch;
  logic in_comment;

  comment_filter dut (.clk(clk), .rst_n(rst_n), .ch_valid(ch_valid), .ch(ch), .in_comment(in_comment));

  always #5 clk = ~clk;

  task automatic run(string text, string mask);
    for (int i = 0; i < text.len(); i++) begin
      ch = text[i]; ch_valid = 1;
      #1;
      checks++;
      if (in_comment !== (mask[i] == "1")) begin
        failures++;
        $display("FAIL char %0d '%s' of \"%s\": got %0d", i, text.substr(i, i), text, in_comment);
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    rst_n = 0; ch_valid = 0; ch = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    //   text                           mask
    run("a=b/c;",                       "000000");
    run("x;//hi\ny",                    "00011100");
    run("/*ab*/z",                      "0111100");
    run("/* x **/q",                    "011111100");
    run("/*/*/w",                       "011100");
    run("p//*a\n",                      "001110");
    run("a/*b\nc*/d",                   "001111100");
    // hold: ch_valid low must not advance the machine
    run("/*", "01");
    ch_valid = 0; ch = "*"; @(posedge clk); #1;
    ch = "/"; @(posedge clk); #1;
    run("x*/y", "1100");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
