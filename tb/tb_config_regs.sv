// Self-checking testbench for config_regs.
//
// A queue stands in for the show-ahead command FIFO. Random command words
// (all opcodes, random data) are offered; each popped word is applied to a
// register model and the outputs are compared after every cycle. While
// `busy` is high nothing may be popped; every START must give exactly one
// start pulse carrying its N_SAMPLES.
module tb_config_regs;

  import ro_pkg::*;

  localparam int unsigned FL = 16, GL = 15;
  int checks = 0, failures = 0;

  logic              clk = 0, rst_n = 0, busy = 0;
  logic              cmd_empty, cmd_rd, sel_garo, start;
  logic [31:0]       cmd_data;
  logic [FL-1:1]     firo_ctr;
  logic [GL-1:1]     garo_ctr;
  logic [15:0]       t_stabilise, t_sample;
  logic [23:0]       n_samples;

  config_regs #(.FIRO_LENGTH(FL), .GARO_LENGTH(GL)) dut (
    .clk(clk), .rst_n(rst_n), .cmd_empty(cmd_empty), .cmd_data(cmd_data),
    .cmd_rd(cmd_rd), .busy(busy), .firo_ctr(firo_ctr), .garo_ctr(garo_ctr),
    .t_stabilise(t_stabilise), .t_sample(t_sample), .sel_garo(sel_garo),
    .n_samples(n_samples), .start(start)
  );

  always #5ns clk = ~clk;

  logic [31:0] q[$];
  // FIFO outputs, refreshed after every change of the queue
  function automatic void show_head();
    cmd_empty = (q.size() == 0);
    cmd_data  = (q.size() == 0) ? 32'h0 : q[0];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [FL-1:1] m_firo = '0;
    logic [GL-1:1] m_garo = '0;
    logic [15:0]   m_ts = '0, m_tsmp = '0;
    logic          m_sel = 0, m_start = 0;
    logic [23:0]   m_n = '0;
    int unsigned   starts = 0, exp_starts = 0, pops = 0;
    show_head();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(firo_ctr == m_firo && garo_ctr == m_garo, "ctr registers");
      check(t_stabilise == m_ts && t_sample == m_tsmp, $sformatf("time registers %h %h model %h %h", t_stabilise, t_sample, m_ts, m_tsmp));
      check(sel_garo == m_sel, "select register");
      check(start == m_start, "start pulse");
      if (start) begin
        starts++;
        check(n_samples == m_n, "n_samples");
      end
      if ($urandom_range(0, 2) == 0) q.push_back({4'($urandom_range(0, 8)), 28'($urandom)});
      show_head();
      busy = ($urandom_range(0, 3) == 0);
      #1ns;
      if (busy) check(!cmd_rd, "popped while busy");
      check(cmd_rd == (!cmd_empty && !busy && !start), "pop condition");
      m_start = 0;
      if (cmd_rd) begin
        logic [31:0] w;
        w = q[0];
        @(posedge clk);
        #1ns;
        void'(q.pop_front());
        show_head();
        pops++;
        case (w[31:28])
          4'h1: m_firo = w[FL-2:0];
          4'h2: m_garo = w[GL-2:0];
          4'h3: m_ts   = w[15:0];
          4'h4: m_tsmp = w[15:0];
          4'h5: m_sel  = w[0];
          4'h6: begin m_n = w[23:0]; m_start = 1; exp_starts++; end
          default: ;
        endcase
      end
    end
    @(negedge clk);
    if (start) starts++;
    check(starts == exp_starts && starts > 10, $sformatf("starts %0d expected %0d", starts, exp_starts));
    $display("pops %0d starts %0d", pops, starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
