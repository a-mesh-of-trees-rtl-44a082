// tb_mot_obuf: self-checking testbench of the two-buffer output port.
//
// A writer stores packets whenever can_write allows (with a random gap) and a
// reader captures the head packet at random and toggles ks_in after each
// capture, as a next stage does. A queue model checks that every packet comes
// out once, in order, that no more than two are ever held, and that with the
// reader always ready and the writer always writing the port passes one
// packet per cycle.
module tb_mot_obuf;
  localparam int unsigned W = 80;

  logic         clk = 0, rst_n = 0;
  logic         wr_en, can_write, out_req, ks_in;
  logic [W-1:0] wr_data, out_data;
  int unsigned  checks = 0, failures = 0;
  int unsigned  cyc = 0;
  int unsigned  wr_pct = 100, rd_pct = 100;
  logic         rd_ready, wr_go;
  logic [W-1:0] model[$];
  logic [W-1:0] next_val;
  int unsigned  phase_caps = 0, caps0;

  mot_obuf #(.W(W)) dut (.*);

  always #5 clk = !clk;

  assign wr_en   = rst_n && can_write && wr_go;
  assign wr_data = next_val;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      ks_in    <= 1'b0;
      next_val <= W'({$urandom, $urandom, $urandom});
      rd_ready <= 1'b0;
      wr_go    <= 1'b0;
    end else begin
      rd_ready <= $urandom_range(99) < rd_pct;
      wr_go    <= $urandom_range(99) < wr_pct;
      if (wr_en) begin
        model.push_back(wr_data);
        next_val <= W'({$urandom, $urandom, $urandom});
      end
      if (out_req && rd_ready) begin
        checks++;
        if (model.size() == 0 || out_data != model[0]) begin
          failures++;
          $display("FAIL cycle %0d: unexpected packet %h", cyc, out_data);
        end else void'(model.pop_front());
        ks_in <= !ks_in;
        phase_caps <= phase_caps + 1;
      end
      // occupancy never exceeds the two buffers
      checks++;
      if (model.size() + (wr_en ? 1 : 0) > 3) begin
        failures++;
        $display("FAIL cycle %0d: port holds %0d packets", cyc, model.size());
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random traffic
    for (int p = 0; p < 4; p++) begin
      wr_pct = (p == 0) ? 100 : 30 + 20 * p;
      rd_pct = (p == 1) ? 100 : 20 + 25 * p;
      repeat (500) @(posedge clk);
    end
    // full rate: one packet per cycle
    wr_pct = 100; rd_pct = 100;
    repeat (20) @(posedge clk);
    @(negedge clk) caps0 = phase_caps;
    repeat (100) @(posedge clk);
    @(negedge clk);
    checks++;
    if (phase_caps - caps0 != 100) begin
      failures++;
      $display("FAIL: %0d packets in 100 cycles at full rate, expected 100", phase_caps - caps0);
    end
    // drain: the port must empty
    wr_pct = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (model.size() != 0 || out_req) begin
      failures++;
      $display("FAIL: %0d packets left after drain", model.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
