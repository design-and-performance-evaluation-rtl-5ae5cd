// tb_ebc_controller: drives the controller with a small model of the cache
// datapath. The testbench keeps its own set of resident blocks (main_hit is
// looked up there for the block address the controller reads), decides per
// request whether the packet straddles and whether the buffer holds its
// tail, and uses the behavioural memory. For each request it predicts the
// path (single access, buffer-assisted, double access, refill of the front
// and/or successive block), the exact response cycle when the memory does
// not stall, the refill addresses and line contents, and the event pulses.
module tb_ebc_controller;
  import ebc_pkg::*;
  localparam int LAT = 15, BEATS = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_single = 0, n_bufhit = 0, n_double = 0, n_front_miss = 0, n_succ_miss = 0;

  logic rst_n, req_valid, req_ready, resp_valid, resp_double;
  logic [31:0] req_pc, pc_q;
  logic main_hit, straddle, tail_ok, buf_en;
  ebc_state_e state;
  logic [26:0] rd_baddr, fill_baddr;
  logic hold_head, buf_wr_en, fill_en;
  logic [255:0] fill_line;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [31:0] mem_req_addr;
  logic [63:0] mem_resp_data;
  logic ev_main_access, ev_main_miss, ev_double, ev_buf_access, ev_buf_hit, ev_buf_fill;
  logic stall_en;
  int unsigned n_mreq, n_mstall;

  ebc_controller #(.ADDR_W(32), .W_MAIN(8), .INST_W(32), .BUS_W(64)) dut (.*);

  mem_model #(.WORDS(2048), .LATENCY(LAT)) u_mem (
    .clk, .rst_n, .stall_en, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .resp_valid(mem_resp_valid), .resp_data(mem_resp_data),
    .n_requests(n_mreq), .n_stalls(n_mstall)
  );

  logic [255:0] resident;
  always_comb main_hit = resident[rd_baddr[7:0]] && (rd_baddr < 27'd256);

  // datapath inputs for the request in flight
  logic cur_straddle, cur_tail_ok;
  always_comb begin
    straddle = cur_straddle;
    tail_ok  = cur_tail_ok;
    buf_en   = cur_straddle;
  end

  int cyc = 0;
  always @(posedge clk) if ($test$plusargs("trace")) $display("%0d st=%0d rv=%0b rr=%0b pc=%h rdba=%0d hit=%0b s=%0b tok=%0b resp=%0b memv=%0b", cyc, state, req_valid, req_ready, pc_q, rd_baddr, main_hit, straddle, tail_ok, resp_valid, mem_req_valid);
  always @(posedge clk) cyc <= cyc + 1;

  // refill contents and residency
  always @(posedge clk) if (rst_n && fill_en) begin
    checks++;
    for (int k = 0; k < 8; k++)
      if (fill_line[k*32 +: 32] !== u_mem.mem[fill_baddr*8 + k]) begin
        failures++; $display("FAIL fill line word %0d block %0d", k, fill_baddr); break;
      end
    resident[fill_baddr[7:0]] <= 1'b1;
  end

  // event counters
  int e_miss = 0, e_double = 0, e_bufhit = 0, e_fill = 0;
  always @(posedge clk) if (rst_n) begin
    e_miss   += int'(ev_main_miss);
    e_double += int'(ev_double);
    e_bufhit += int'(ev_buf_hit);
    e_fill   += int'(ev_buf_fill);
    if (hold_head && !(state == ST_LOOKUP)) begin failures++; $display("FAIL hold_head outside LOOKUP"); end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x_miss = 0, x_double = 0, x_bufhit = 0;
    rst_n = 0; req_valid = 0; req_pc = 0; stall_en = 0;
    cur_straddle = 0; cur_tail_ok = 1;
    resident = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      int b, t0, exp_lat;
      logic accepted;
      logic fm, sm, st, tok;
      @(negedge clk);  // the testbench changes its model only between edges
      if (t == 1000) stall_en = 1;
      b   = $urandom % 200;
      // stand-in for conflict replacement elsewhere in the cache
      if ($urandom % 4 == 0) resident[b] = 1'b0;
      if ($urandom % 4 == 0) resident[b+1] = 1'b0;
      st  = 1'($urandom % 2);
      tok = 1'($urandom % 2);
      fm  = !resident[b];
      sm  = st && !tok && !resident[b+1];
      exp_lat = 1 + (fm ? 2 + LAT + BEATS : 0) + ((st && !tok) ? 1 + (sm ? 2 + LAT + BEATS : 0) : 0);
      req_valid = 1; req_pc = {5'(0), 22'(b), 3'(st ? 6 : 1), 2'b00}; if ($test$plusargs("trace")) $display("SET t=%0d b=%0d pc=%h at cyc %0d", t, b, req_pc, cyc);
      cur_straddle = st; cur_tail_ok = tok;
      // hold the request until taken: ready is sampled before the edge
      accepted = 1'b0;
      while (!accepted) begin
        accepted = req_ready;
        @(posedge clk);
        if (!accepted) @(negedge clk);
      end
      t0 = cyc;
      #1 req_valid = 0;
      while (!resp_valid) @(negedge clk);
      if ($test$plusargs("trace")) $display("RESP t=%0d time=%0t state=%0d pc=%h hit=%0b s=%0b tok=%0b", t, $time, state, pc_q, main_hit, straddle, tail_ok);
      checks++;
      if (pc_q !== {5'(0), 22'(b), 3'(st ? 6 : 1), 2'b00}) begin failures++; $display("FAIL pc_q t=%0d got %h b=%0d st=%0b cyc=%0d t0=%0d", t, pc_q, b, st, cyc, t0); end
      checks++;
      if (resp_double !== (st && !tok)) begin failures++; $display("FAIL resp_double t=%0d", t); end
      checks++;
      if (buf_wr_en !== (st && !tok)) begin failures++; $display("FAIL buf_wr_en t=%0d", t); end
      if (!stall_en) begin
        checks++;
        if (cyc - t0 != exp_lat) begin
          failures++; $display("FAIL latency t=%0d got %0d exp %0d (fm=%0b st=%0b tok=%0b sm=%0b)", t, cyc - t0, exp_lat, fm, st, tok, sm);
        end
      end
      @(posedge clk);  // let the response cycle end before the next request's inputs change
      if (fm) begin n_front_miss++; x_miss++; end
      if (sm) begin n_succ_miss++; x_miss++; end
      if (st && !tok) begin n_double++; x_double++; end
      else if (st) begin n_bufhit++; x_bufhit++; end
      else n_single++;
    end
    @(negedge clk); @(negedge clk);
    checks++; if (e_miss   != x_miss)   begin failures++; $display("FAIL miss events %0d exp %0d", e_miss, x_miss); end
    checks++; if (e_double != x_double) begin failures++; $display("FAIL double events %0d exp %0d", e_double, x_double); end
    checks++; if (e_fill   != x_double) begin failures++; $display("FAIL fill events"); end
    checks++; if (e_bufhit != x_bufhit) begin failures++; $display("FAIL bufhit events %0d exp %0d", e_bufhit, x_bufhit); end
    checks++; if (int'(n_mreq) != x_miss) begin failures++; $display("FAIL memory requests %0d exp %0d", n_mreq, x_miss); end
    checks++; if (n_mstall == 0 || n_single == 0 || n_bufhit == 0 || n_double == 0 || n_front_miss == 0 || n_succ_miss == 0) begin
      failures++; $display("FAIL a path never exercised");
    end
    $display("single %0d bufhit %0d double %0d front_miss %0d succ_miss %0d mem_stalls %0d",
             n_single, n_bufhit, n_double, n_front_miss, n_succ_miss, n_mstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
