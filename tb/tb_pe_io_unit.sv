// tb_pe_io_unit: receive from each of the four directions, send from the
// data input, and forward the received word in the same cycle.
module tb_pe_io_unit;
  import mp_pkg::*;
  logic clk = 0, rst, send_en, send_fwd, recv_en;
  dir_e recv_dir;
  logic [7:0] send_data, in_n, in_e, in_s, in_w, out_buf, in_buf;
  int checks = 0, failures = 0;

  pe_io_unit dut (.clk, .rst, .send_en, .send_fwd, .send_data, .recv_en, .recv_dir,
                  .in_n, .in_e, .in_s, .in_w, .out_buf, .in_buf);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] eo, ei, inc;
    rst = 1; send_en = 0; send_fwd = 0; recv_en = 0; recv_dir = DIR_N; send_data = 0;
    in_n = 0; in_e = 0; in_s = 0; in_w = 0;
    @(posedge clk); #1 rst = 0;
    eo = 0; ei = 0;
    for (int t = 0; t < 2000; t++) begin
      send_en = 1'($urandom); send_fwd = 1'($urandom); recv_en = 1'($urandom);
      recv_dir = dir_e'($urandom_range(0, 3)); send_data = 8'($urandom);
      in_n = 8'($urandom); in_e = 8'($urandom); in_s = 8'($urandom); in_w = 8'($urandom);
      case (recv_dir)
        DIR_N: inc = in_n;
        DIR_E: inc = in_e;
        DIR_S: inc = in_s;
        default: inc = in_w;
      endcase
      @(posedge clk); #1;
      if (recv_en) ei = inc;
      if (send_en) eo = send_fwd ? inc : send_data;
      checks++;
      if (out_buf !== eo || in_buf !== ei) begin
        failures++;
        $display("FAIL t=%0d out=%h/%h in=%h/%h", t, out_buf, eo, in_buf, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
