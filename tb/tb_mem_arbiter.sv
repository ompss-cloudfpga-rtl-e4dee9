// tb_mem_arbiter: self-checking test of the memory interconnect.
// Three read masters and two write masters issue accesses at the same time.
// Each read master must get back exactly the beats of its own address range
// (checked against the memory model's initial contents, or against what a
// writer stored), each writer's data must land at its address, and each
// writer must see its own wr_done once per write.
module tb_mem_arbiter;
  import ompif_pkg::*;
  import tb_util_pkg::*;

  localparam int NRD = 3, NWR = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [NRD-1:0] m_rd_cmd_valid, m_rd_cmd_ready, m_rd_data_valid, m_rd_data_ready;
  mem_cmd_t [NRD-1:0] m_rd_cmd;
  logic [DATA_W-1:0] m_rd_data;
  logic m_rd_last;
  logic [NWR-1:0] m_wr_cmd_valid, m_wr_cmd_ready, m_wr_data_valid, m_wr_data_ready, m_wr_last, m_wr_done;
  mem_cmd_t [NWR-1:0] m_wr_cmd;
  logic [NWR-1:0][DATA_W-1:0] m_wr_data;
  logic s_rd_cmd_valid, s_rd_cmd_ready, s_rd_data_valid, s_rd_data_ready, s_rd_last;
  logic s_wr_cmd_valid, s_wr_cmd_ready, s_wr_data_valid, s_wr_data_ready, s_wr_last, s_wr_done;
  mem_cmd_t s_rd_cmd, s_wr_cmd;
  logic [DATA_W-1:0] s_rd_data, s_wr_data;

  mem_arbiter #(.NRD(NRD), .NWR(NWR)) dut (.clk, .rst_n,
    .m_rd_cmd_valid, .m_rd_cmd_ready, .m_rd_cmd, .m_rd_data_valid, .m_rd_data_ready, .m_rd_data, .m_rd_last,
    .m_wr_cmd_valid, .m_wr_cmd_ready, .m_wr_cmd, .m_wr_data_valid, .m_wr_data_ready, .m_wr_data, .m_wr_last, .m_wr_done,
    .s_rd_cmd_valid, .s_rd_cmd_ready, .s_rd_cmd, .s_rd_data_valid, .s_rd_data_ready, .s_rd_data, .s_rd_last,
    .s_wr_cmd_valid, .s_wr_cmd_ready, .s_wr_cmd, .s_wr_data_valid, .s_wr_data_ready, .s_wr_data, .s_wr_last, .s_wr_done);

  tb_mem_model #(.STALL(15)) mem (.clk, .rst_n,
    .rd_cmd_valid(s_rd_cmd_valid), .rd_cmd_ready(s_rd_cmd_ready), .rd_cmd(s_rd_cmd), .rd_data_valid(s_rd_data_valid),
    .rd_data_ready(s_rd_data_ready), .rd_data(s_rd_data), .rd_last(s_rd_last),
    .wr_cmd_valid(s_wr_cmd_valid), .wr_cmd_ready(s_wr_cmd_ready), .wr_cmd(s_wr_cmd), .wr_data_valid(s_wr_data_valid),
    .wr_data_ready(s_wr_data_ready), .wr_data(s_wr_data), .wr_last(s_wr_last), .wr_done(s_wr_done));

  localparam int NOPS = 4, BEATS = 5;

  // read masters: NOPS reads of BEATS beats at region (m+1)<<20
  int rd_ops [NRD], rd_bt [NRD], rd_state [NRD];
  always_comb for (int m = 0; m < NRD; m++) begin
    m_rd_cmd_valid[m] = rst_n && rd_state[m] == 0 && rd_ops[m] < NOPS;
    m_rd_cmd[m].addr  = ADDR_W'((m + 1) << 20) + ADDR_W'(rd_ops[m] * BEATS * 64);
    m_rd_cmd[m].bytes = FLEN_W'(BEATS * 64);
  end
  always @(posedge clk) for (int m = 0; m < NRD; m++) begin
    m_rd_data_ready[m] <= ($urandom % 3) != 0;
    if (m_rd_cmd_valid[m] && m_rd_cmd_ready[m]) rd_state[m] <= 1;
    if (m_rd_data_valid[m] && m_rd_data_ready[m]) begin
      check(m_rd_data == init_word(ADDR_W'((m + 1) << 20) + ADDR_W'((rd_ops[m] * BEATS + rd_bt[m]) * 64)), "read data to its master");
      check(m_rd_last == (rd_bt[m] == BEATS - 1), "read last");
      if (m_rd_last) begin rd_state[m] <= 0; rd_bt[m] <= 0; rd_ops[m] <= rd_ops[m] + 1; end
      else rd_bt[m] <= rd_bt[m] + 1;
    end
  end

  // write masters
  int wr_ops [NWR], wr_bt [NWR], wr_state [NWR], wr_dones [NWR];
  always_comb for (int m = 0; m < NWR; m++) begin
    m_wr_cmd_valid[m]  = rst_n && wr_state[m] == 0 && wr_ops[m] < NOPS;
    m_wr_cmd[m].addr   = ADDR_W'((m + 8) << 20) + ADDR_W'(wr_ops[m] * BEATS * 64);
    m_wr_cmd[m].bytes  = FLEN_W'(BEATS * 64);
    m_wr_data_valid[m] = wr_state[m] == 1;
    m_wr_data[m]       = mark_word(32'(m), 32'(wr_ops[m]), 32'(wr_bt[m]));
    m_wr_last[m]       = wr_bt[m] == BEATS - 1;
  end
  always @(posedge clk) for (int m = 0; m < NWR; m++) begin
    if (m_wr_cmd_valid[m] && m_wr_cmd_ready[m]) wr_state[m] <= 1;
    if (m_wr_data_valid[m] && m_wr_data_ready[m]) begin
      if (m_wr_last[m]) begin wr_state[m] <= 2; wr_bt[m] <= 0; end
      else wr_bt[m] <= wr_bt[m] + 1;
    end
    if (m_wr_done[m]) begin
      check(wr_state[m] == 2, "write done only after own write");
      wr_dones[m] <= wr_dones[m] + 1; wr_state[m] <= 0; wr_ops[m] <= wr_ops[m] + 1;
    end
  end

  initial begin
    for (int m = 0; m < NRD; m++) begin rd_ops[m] = 0; rd_bt[m] = 0; rd_state[m] = 0; end
    for (int m = 0; m < NWR; m++) begin wr_ops[m] = 0; wr_bt[m] = 0; wr_state[m] = 0; wr_dones[m] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (rd_ops[0] == NOPS && rd_ops[1] == NOPS && rd_ops[2] == NOPS && wr_ops[0] == NOPS && wr_ops[1] == NOPS);
    for (int m = 0; m < NWR; m++) begin
      check(wr_dones[m] == NOPS, "one done per write");
      for (int o = 0; o < NOPS; o++)
        for (int b = 0; b < BEATS; b++)
          check(mem.peek(ADDR_W'((m + 8) << 20) + ADDR_W'((o * BEATS + b) * 64)) == mark_word(32'(m), 32'(o), 32'(b)),
                "written data in memory");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
