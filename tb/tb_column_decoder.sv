// tb_column_decoder: random packet layouts over two consecutive blocks.
// The testbench lays out I-packets of 1..4 instructions, derives the length
// field row itself, picks a packet start in the front block and offers the
// successive block's first instructions as the tail with a random number of
// valid slots (0..3). The expected packet, its length, the straddle flag and
// whether the tail sufficed are all taken from the layout.
module tb_column_decoder;
  import ebc_pkg::*;
  localparam int W = 8, N = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_straddle = 0, n_short_tail = 0;

  inst_t [W-1:0]      row;
  logic  [W-1:0]      len_c;
  logic  [W-1:0][2:0] len_off;
  logic  [2:0]        off;
  inst_t [N-2:0]      tail;
  logic  [2:0]        tail_avail, pkt_len, head_len, tail_len;
  inst_t [N-1:0]      pkt;
  logic               straddle, tail_ok, c_sel;
  logic  [2:0]        off_sel;

  column_decoder #(.W_MAIN(W), .N_ISSUE(N)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inst_t words [2*W];
    int    pstart [2*W];
    int    plen   [2*W];
    for (int t = 0; t < 5000; t++) begin
      int w, s, l, first_in_next, ta;
      int starts [$];
      // lay out packets from a random phase so packets cross the boundary
      w = -int'($urandom % 4);
      starts.delete();
      while (w < 2*W) begin
        l = 1 + $urandom % N;
        for (int k = 0; k < l; k++)
          if (w + k >= 0 && w + k < 2*W) begin
            words[w+k]  = {(k == l - 1), 31'($urandom)};
            pstart[w+k] = w;
            plen[w+k]   = l;
          end
        if (w >= 0 && w < W) starts.push_back(w);
        w += l;
      end
      if (starts.size() == 0) continue;
      // reference length field for the front block
      for (int i = 0; i < W; i++) begin
        int j; j = i;
        while (j < W && !words[j][31]) j++;
        len_c[i]   = (j >= W - 1);
        len_off[i] = (j >= W - 1) ? 3'd0 : 3'(j + 1);
        row[i]     = words[i];
      end
      for (int k = 0; k < N - 1; k++) tail[k] = words[W+k];
      s  = starts[$urandom % starts.size()];
      l  = plen[s];
      off = 3'(s);
      ta  = $urandom % N;
      tail_avail = 3'(ta);
      #1;
      begin
        logic es; int need;
        es   = (s + l > W);
        need = es ? s + l - W : 0;
        if (es) n_straddle++;
        if (es && need > ta) n_short_tail++;
        checks++;
        if (straddle !== es) begin failures++; $display("FAIL straddle s=%0d l=%0d", s, l); end
        checks++;
        if (tail_ok !== (!es || need <= ta)) begin failures++; $display("FAIL tail_ok s=%0d l=%0d ta=%0d", s, l, ta); end
        if (!es || need <= ta) begin
          checks++;
          if (int'(pkt_len) != l) begin failures++; $display("FAIL len s=%0d l=%0d got %0d", s, l, pkt_len); end
          checks++;
          if (int'(tail_len) != need) begin failures++; $display("FAIL tail_len"); end
          for (int k = 0; k < N; k++) begin
            checks++;
            if (pkt[k] !== ((k < l) ? words[s+k] : 32'd0)) begin
              failures++; $display("FAIL slot %0d s=%0d l=%0d", k, s, l);
            end
          end
        end
      end
    end
    checks++;
    if (n_straddle == 0 || n_short_tail == 0) failures++;
    $display("straddle packets %0d, tails not covered %0d", n_straddle, n_short_tail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
