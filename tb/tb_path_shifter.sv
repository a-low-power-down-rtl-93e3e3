// tb_path_shifter: parallel-in/serial-out shifter with N = 4 words of 8 bits
// and with the default 16 x 16 bits.  Random words are loaded, with and
// without the tag, back to back (load on the cycle of the last word) and with
// idle gaps; the words must come out in position order, one per cycle, with
// out_last on the final word of a tagged load only.
module tb_path_shifter;

  logic clk = 0, rst_n = 0;
  logic load_s = 0, load_l = 0, tag = 0;
  logic [3:0][7:0]   din_s = '0;
  logic [15:0][15:0] din_l = '0;
  logic ov_s, last_s, orun_s, ov_l, last_l, orun_l;
  logic [7:0]  w_s;
  logic [15:0] w_l;

  int checks = 0, failures = 0;

  path_shifter #(.N(4), .W(8)) dut_s (.clk(clk), .rst_n(rst_n), .load(load_s), .tag_in(tag),
    .din(din_s), .out_valid(ov_s), .out_word(w_s), .out_last(last_s), .overrun(orun_s));
  path_shifter dut_l (.clk(clk), .rst_n(rst_n), .load(load_l), .tag_in(tag),
    .din(din_l), .out_valid(ov_l), .out_word(w_l), .out_last(last_l), .overrun(orun_l));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected stream for each shifter: word and last flag per output cycle.
  // Index 0: the N = 4 shifter, index 1: the N = 16 shifter.
  logic [15:0] q_w[2][$];
  bit          q_l[2][$];

  always @(negedge clk) if (rst_n) begin
    bit          v[2], l[2];
    logic [15:0] w[2];
    v = '{ov_s, ov_l};
    l = '{last_s, last_l};
    w = '{16'(w_s), w_l};
    for (int i = 0; i < 2; i++) begin
      if (v[i]) begin
        checks++;
        if (q_w[i].size() == 0) begin
          failures++;
          $display("FAIL shifter %0d: unexpected word %h", i, w[i]);
        end else begin
          logic [15:0] ew;
          bit el;
          ew = q_w[i].pop_front();
          el = q_l[i].pop_front();
          if (w[i] != ew || l[i] != el) begin
            failures++;
            $display("FAIL shifter %0d: word %h last %0d, expected %h %0d", i, w[i], l[i], ew, el);
          end
        end
      end else if (l[i]) begin
        failures++;
        $display("FAIL shifter %0d: out_last without out_valid", i);
      end
    end
  end

  // Load the short and/or the long shifter with random words.
  task automatic do_load(bit ld_s, bit ld_l, bit t);
    @(negedge clk);
    for (int i = 0; i < 4; i++)  din_s[i] = 8'($urandom);
    for (int i = 0; i < 16; i++) din_l[i] = 16'($urandom);
    tag    = t;
    load_s = ld_s;
    load_l = ld_l;
    // the load is taken at the next rising edge; its words follow in order
    @(posedge clk);
    if (ld_s) for (int i = 0; i < 4; i++)  begin q_w[0].push_back(16'(din_s[i])); q_l[0].push_back(t && i == 3); end
    if (ld_l) for (int i = 0; i < 16; i++) begin q_w[1].push_back(din_l[i]);      q_l[1].push_back(t && i == 15); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      // long shifter loaded only every 16 cycles, short one every 4
      for (int j = 0; j < 4; j++) begin
        do_load(1, j == 0, $urandom_range(1));
        @(negedge clk);
        load_s = 0;
        load_l = 0;
        repeat (2 + ((k % 3 == 0) ? $urandom_range(3) : 0)) @(negedge clk);
      end
      repeat ((k % 5 == 0) ? 20 : 5) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks += 3;
    if (q_w[0].size() != 0 || q_w[1].size() != 0) begin
      failures++;
      $display("FAIL words not delivered: %0d %0d", q_w[0].size(), q_w[1].size());
    end
    if (orun_s || orun_l) begin
      failures++;
      $display("FAIL overrun flagged");
    end
    if (ov_s || ov_l) begin
      failures++;
      $display("FAIL shifter not empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
