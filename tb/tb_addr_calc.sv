// Self-checking testbench for addr_calc: exhaustive over event positions and
// kernel elements for several shifts, map sizes and sub-sampling amounts,
// against an independent integer model.
module tb_addr_calc;
  localparam int NR = 28, NC = 28;
  logic [4:0] ev_x, ev_y; logic [3:0] ki, kj, shift_row, shift_col;
  logic [7:0] map_rows, map_cols; logic [2:0] subsample;
  logic in_range; logic [9:0] naddr; logic [4:0] nrow, ncol, out_x, out_y;
  int checks = 0, failures = 0, inr = 0;

  addr_calc #(.NROWS(NR), .NCOLS(NC)) dut (.*);

  initial begin
    int r, c; bit ok;
    for (int cfg = 0; cfg < 6; cfg++) begin
      shift_row = 4'(cfg % 5); shift_col = 4'((cfg * 3) % 5);
      map_rows = (cfg == 3) ? 8'd10 : (cfg == 5) ? 8'd40 : 8'd28;
      map_cols = (cfg == 3) ? 8'd10 : (cfg == 4) ? 8'd1 : 8'd28;
      subsample = 3'(cfg % 3);
      for (int x = 0; x < 32; x++) for (int y = 0; y < 32; y += 3)
        for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) begin
          ev_x = 5'(x); ev_y = 5'(y); ki = 4'(i); kj = 4'(j);
          #1;
          r = x + i - int'(shift_row); c = y + j - int'(shift_col);
          ok = r >= 0 && c >= 0 && r < ((map_rows > NR) ? NR : map_rows) && c < ((map_cols > NC) ? NC : map_cols);
          checks++;
          if (in_range != ok) begin failures++; $display("FAIL: range %0d %0d", r, c); end
          else if (ok) begin
            inr++;
            checks++;
            if (naddr != 10'(r * NC + c) || out_x != 5'(r >> subsample) || out_y != 5'(c >> subsample)) begin
              failures++; $display("FAIL: addr %0d %0d", r, c);
            end
          end
        end
    end
    checks++; if (inr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
