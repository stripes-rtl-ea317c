// tb_nm_write_arbiter: random brick write requests from 16 tiles and the
// host. For every bank the testbench works out who should win (host first,
// then the lowest-numbered tile) and checks the grants, the bank write
// enables, rows and data, and the conflict flags.
module tb_nm_write_arbiter;
  import stripes_pkg::*;
  logic [15:0] req_valid, req_ready;
  logic [15:0][23:0] req_addr;
  brick_t [15:0] req_data;
  logic host_valid;
  logic [23:0] host_addr;
  brick_t host_data;
  logic [15:0] wr_en, conflict;
  logic [15:0][12:0] wr_row;
  brick_t [15:0] wr_data;
  int checks = 0, failures = 0, conflicts = 0;

  nm_write_arbiter dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      req_valid = 16'($urandom);
      for (int t = 0; t < 16; t++) begin
        req_addr[t] = 24'($urandom % 4096);
        for (int i = 0; i < 16; i++) req_data[t][i] = 16'($urandom);
      end
      host_valid = ($urandom % 4) == 0;
      host_addr = 24'($urandom % 4096);
      for (int i = 0; i < 16; i++) host_data[i] = 16'($urandom);
      #1;
      for (int b = 0; b < 16; b++) begin
        int win, n;
        win = -2; n = 0;   // -2 none, -1 host
        if (host_valid && host_addr % 16 == b) win = -1;
        for (int t = 0; t < 16; t++)
          if (req_valid[t] && req_addr[t] % 16 == b) begin
            n++;
            if (win == -2) win = t;
          end
        checks++;
        if (win == -2) begin
          if (wr_en[b]) begin failures++; $display("FAIL idle bank %0d", b); end
        end else if (win == -1) begin
          if (!wr_en[b] || wr_row[b] !== 13'(host_addr / 16) || wr_data[b] !== host_data) failures++;
        end else begin
          if (!wr_en[b] || wr_row[b] !== 13'(req_addr[win] / 16) || wr_data[b] !== req_data[win]) begin
            failures++; $display("FAIL bank %0d winner %0d", b, win);
          end
        end
        checks++;
        if (conflict[b] !== ((win == -1 && n > 0) || n > 1)) failures++;
        if (conflict[b]) conflicts++;
      end
      for (int t = 0; t < 16; t++) begin
        bit exp;
        exp = req_valid[t] && !(host_valid && host_addr % 16 == req_addr[t] % 16);
        for (int u = 0; u < t; u++)
          if (req_valid[u] && req_addr[u] % 16 == req_addr[t] % 16) exp = 0;
        checks++;
        if (req_ready[t] !== exp) begin failures++; $display("FAIL ready %0d", t); end
      end
    end
    checks++;
    if (conflicts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
