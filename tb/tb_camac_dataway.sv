// tb_camac_dataway: every station number, selected or not; only the addressed
// station's N line is high and R, Q, X come from that station alone.
module tb_camac_dataway;
  localparam int SLOTS = 23;
  logic sel;
  logic [4:0] n_num;
  logic [SLOTS-1:0] n_line, q_st, x_st;
  logic [23:0] r_st [SLOTS];
  logic [23:0] r;
  logic q, x;
  int checks = 0, failures = 0;

  camac_dataway #(.SLOTS(SLOTS)) dut (.sel(sel), .n_num(n_num), .n_line(n_line),
    .r_st(r_st), .q_st(q_st), .x_st(x_st), .r(r), .q(q), .x(x));

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int k = 0; k < SLOTS; k++) r_st[k] = 24'($urandom);
      q_st = SLOTS'($urandom); x_st = SLOTS'($urandom);
      for (int n = 0; n < 32; n++) begin
        for (int s = 0; s < 2; s++) begin
          logic [SLOTS-1:0] exp_n;
          sel = s[0]; n_num = 5'(n);
          #1;
          exp_n = '0;
          if (sel && n >= 1 && n <= SLOTS) exp_n[n-1] = 1'b1;
          checks++;
          if (n_line !== exp_n) failures++;
          checks++;
          if (sel && n >= 1 && n <= SLOTS) begin
            if (r !== r_st[n-1] || q !== q_st[n-1] || x !== x_st[n-1]) failures++;
          end else if (r !== '0 || q || x) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
