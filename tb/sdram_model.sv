// sdram_model: behavioural model of a 16M x 16 SDR SDRAM (4 banks, 8192
// rows, 512 columns, burst length 1) for testbenches. It decodes commands on
// the clock's rising edge, keeps the open row of each bank, stores written
// words sparsely, returns read data CAS clocks after READ, and checks the
// rules a controller must keep: the power-up sequence (PRECHARGE ALL, two
// REFRESH, MODE), T_RCD from ACTIVE to READ/WRITE, T_RP after a precharge,
// T_RFC after REFRESH, accesses only to an open row, and a refresh at least
// every MAX_REF_GAP clocks. Violations are counted in `errors`.
module sdram_model #(
  parameter int T_RP = 2, T_RCD = 2, T_RFC = 4, CAS = 2, MAX_REF_GAP = 500
) (
  input  logic        clk,
  input  logic        cke,
  input  logic        cs_n, ras_n, cas_n, we_n,
  input  logic [1:0]  ba,
  input  logic [12:0] a,
  input  logic [15:0] dq_in,
  input  logic        dq_oe,
  output logic [15:0] dq_out
);
  int errors = 0, n_ref = 0, n_act = 0, n_rd = 0, n_wr = 0, cycle = 0;
  logic [15:0] mem [int];
  bit          open_b [4];
  int          row_b [4], t_act [4], t_free [4];
  int          t_ref_free = 0, last_ref = 0, init_step = 0;
  logic [15:0] pipe_d [CAS+1];
  bit          pipe_v [CAS+1];

  initial for (int b = 0; b < 4; b++) begin open_b[b] = 0; t_free[b] = 0; end

  task automatic err(input string s);
    errors++;
    $display("SDRAM MODEL: %s at cycle %0d", s, cycle);
  endtask

  always @(posedge clk) begin
    cycle++;
    // read pipeline: data placed so the controller samples it CAS clocks after READ
    for (int k = CAS; k > 0; k--) begin pipe_d[k] = pipe_d[k-1]; pipe_v[k] = pipe_v[k-1]; end
    pipe_v[0] = 0;
    if (cke && !cs_n) begin
      unique case ({ras_n, cas_n, we_n})
        3'b011: begin  // ACTIVE
          n_act++;
          if (init_step < 4) err("ACTIVE before initialization");
          if (open_b[ba]) err("ACTIVE to an open bank");
          if (cycle < t_free[ba] || cycle < t_ref_free) err("ACTIVE too early after precharge or refresh");
          open_b[ba] = 1; row_b[ba] = int'(a); t_act[ba] = cycle;
        end
        3'b101, 3'b100: begin  // READ / WRITE
          int ad;
          if (!open_b[ba]) err("READ/WRITE to a closed bank");
          if (cycle - t_act[ba] < T_RCD) err("T_RCD violated");
          ad = (int'(ba) << 22) | (row_b[ba] << 9) | int'(a[8:0]);
          if (we_n) begin
            n_rd++;
            pipe_d[0] = mem.exists(ad) ? mem[ad] : 16'(ad ^ 32'h5A5A);
            pipe_v[0] = 1;
          end else begin
            n_wr++;
            if (!dq_oe) err("WRITE without driven data");
            mem[ad] = dq_in;
          end
          if (a[10]) begin open_b[ba] = 0; t_free[ba] = cycle + T_RP + 2; end
        end
        3'b010: begin  // PRECHARGE
          if (a[10]) begin
            for (int b = 0; b < 4; b++) begin open_b[b] = 0; t_free[b] = cycle + T_RP; end
            if (init_step == 0) init_step = 1;
          end else begin open_b[ba] = 0; t_free[ba] = cycle + T_RP; end
        end
        3'b001: begin  // REFRESH
          n_ref++;
          for (int b = 0; b < 4; b++) if (open_b[b]) err("REFRESH with an open bank");
          if (cycle < t_ref_free) err("REFRESH too early");
          t_ref_free = cycle + T_RFC;
          if (init_step == 1 || init_step == 2) init_step++;
          else if (init_step >= 4 && cycle - last_ref > MAX_REF_GAP) err("refresh interval too long");
          last_ref = cycle;
        end
        3'b000: begin  // LOAD MODE REGISTER
          if (init_step != 3) err("MODE before precharge and two refreshes");
          if (a[2:0] != 3'b000 || a[6:4] != 3'(CAS)) err("unexpected mode word");
          init_step = 4;
          last_ref = cycle;
        end
        default: ;
      endcase
    end
    // drive data in the clock before the controller samples it
    dq_out <= pipe_v[CAS-1] ? pipe_d[CAS-1] : 16'h0000;
  end
endmodule
