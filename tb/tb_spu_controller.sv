// tb_spu_controller: the bench plays the five processing modules, answering
// each start pulse with a done pulse after a random delay. The wave package
// detector reports N objects (N random 0..12) and then finished. Checks the
// order WPD -> DR -> BR -> AR -> CR for each object, restart then start for
// the first scan, sel_br low only while the scan runs, obj_num per object,
// total_obj = min(N, 10) and one done pulse at the end.
module tb_spu_controller;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, start = 0;
  logic done_wpd = 0, finished_wpd = 0, done_dr = 0, done_br = 0, done_ar = 0, done_cr = 0;
  logic restart_wpd, start_wpd, start_dr, start_br, start_ar, start_cr, sel_br, done, busy;
  logic [3:0] obj_num, total_obj;
  always #5 clk = ~clk;
  spu_controller dut (.clk, .rst, .start, .done_wpd, .finished_wpd, .done_dr, .done_br,
                      .done_ar, .done_cr, .restart_wpd, .start_wpd, .start_dr, .start_br,
                      .start_ar, .start_cr, .sel_br, .obj_num, .total_obj, .done, .busy);

  initial begin #20_000_000; $display("watchdog expired"); failures++; `TB_FINISH end

  int n_obj, found, last, restarts, dones, seq_err;
  // responder: each start gets its done after 1..30 clocks
  logic armed = 0;   // outputs are random until the first reset clock
  always @(posedge clk) if (armed) begin
    if (start_wpd) fork begin
      repeat ($urandom_range(1, 30)) @(negedge clk);
      `CHECK(!sel_br, "buffer port with the scanner during the scan")
      if (last != 0 && last != 5) seq_err++;
      last = 1;
      finished_wpd = (found >= n_obj);
      done_wpd = 1; @(negedge clk); done_wpd = 0;
      if (found < n_obj) found++;
    end join_none
    if (start_dr) fork begin if (last != 1) seq_err++; last = 2; repeat ($urandom_range(1, 30)) @(negedge clk); done_dr = 1; @(negedge clk); done_dr = 0; end join_none
    if (start_br) fork begin if (last != 2) seq_err++; last = 3;
      `CHECK(sel_br, "buffer port with the phase retriever")
      repeat ($urandom_range(1, 30)) @(negedge clk); done_br = 1; @(negedge clk); done_br = 0; end join_none
    if (start_ar) fork begin if (last != 3) seq_err++; last = 4; repeat ($urandom_range(1, 30)) @(negedge clk); done_ar = 1; @(negedge clk); done_ar = 0; end join_none
    if (start_cr) fork begin if (last != 4) seq_err++; last = 5;
      `CHECK(obj_num == 4'(found - 1), $sformatf("obj_num %0d for object %0d", obj_num, found - 1))
      repeat ($urandom_range(1, 30)) @(negedge clk); done_cr = 1; @(negedge clk); done_cr = 0; end join_none
    if (restart_wpd) restarts++;
    if (done) dones++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int run = 0; run < 60; run++) begin
      armed = 1;
      n_obj = $urandom_range(0, 12); found = 0; last = 0; restarts = 0; dones = 0; seq_err = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (dones == 0) @(negedge clk);
      repeat (5) @(negedge clk);
      `CHECK(seq_err == 0, $sformatf("sequence errors %0d", seq_err))
      `CHECK(restarts == 1 && dones == 1 && !busy, "one restart and one done per run")
      `CHECK(total_obj == 4'(n_obj > 10 ? 10 : n_obj), $sformatf("total_obj %0d for %0d", total_obj, n_obj))
    end
    `TB_FINISH
  end
endmodule
