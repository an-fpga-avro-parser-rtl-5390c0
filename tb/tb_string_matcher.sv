// tb_string_matcher: a matcher with the dictionary {"temperature", "dust",
// "a"} receives keys that match, prefixes and extensions of them, other
// words and the empty string. match_now must flag exactly the equal entry
// with the key's last byte, and key_match must hold it from the next cycle
// until the following key completes.
module tb_string_matcher;
  import avro_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [2:0][255:0] KEYS = {256'("a"), 256'("dust"), 256'("temperature")};
  string words[12] = '{"temperature", "dust", "a", "temp", "temperatures", "dus", "",
                       "b", "aa", "humidity", "Dust", "airquality_raw"};

  logic       in_valid = 1'b0;
  logic [7:0] in_byte = '0;
  logic       ov;
  logic [2:0] mn, km;

  string_matcher #(.NKEYS(3), .KEYS(KEYS)) dut (
    .clk, .rst_n, .in_valid, .in_byte, .out_valid(ov), .match_now(mn), .key_match(km)
  );

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [2:0] ref_match(input string w);
    return {w == "a", w == "dust", w == "temperature"};
  endfunction

  initial begin
    logic [2:0] held;
    held = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (200) begin
      int k;
      bq_t q;
      k = $urandom_range(11, 0);
      q.delete();
      put_string(q, words[k]);
      foreach (q[i]) begin
        @(negedge clk);
        in_valid = 1'b0;
        if ($urandom_range(3, 0) == 0) begin
          #1 check(km == held, "key_match must hold between keys");
          @(negedge clk);
        end
        in_valid = 1'b1; in_byte = q[i];
        #1;
        check(km == held, "key_match must hold while the key is parsed");
        check(ov == (i == q.size() - 1), $sformatf("\"%s\": out_valid at byte %0d", words[k], i));
        if (i == q.size() - 1)
          check(mn == ref_match(words[k]), $sformatf("\"%s\": match %b", words[k], mn));
      end
      held = ref_match(words[k]);
      @(negedge clk);
      in_valid = 1'b0;
      #1 check(km == held, $sformatf("\"%s\": key_match %b", words[k], km));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
