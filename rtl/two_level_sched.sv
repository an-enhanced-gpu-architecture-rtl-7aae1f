// two_level_sched: two-level round-robin warp fetch scheduler.
// The W warps are split into W/FG fixed fetch groups of FG consecutive warps.
// One group is prioritised; the others follow in round-robin order behind it.
// Each cycle the highest-priority group with a ready warp supplies the grant,
// and inside a group warps take turns round-robin (a per-group pointer moves
// past the warp last fetched). When every warp of the prioritised group is
// stalled on a long-latency operation (or finished), priority moves to the next
// group and the old one becomes lowest. A timeout rule also moves priority
// after TIMEOUT instructions fetched from one prioritised group, which the
// source applies when a fetch group is a single large warp. FG = W gives plain
// round-robin. Grant is combinational; take_i says the granted warp was
// fetched this cycle. switch_o / timeout_o pulse on a group switch.
module two_level_sched #(
  parameter int unsigned W       = 4,
  parameter int unsigned FG      = 1,
  parameter int unsigned TIMEOUT = 32768
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [W-1:0]            ready_i,
  input  logic [W-1:0]            stalled_i,
  input  logic                    take_i,
  output logic                    grant_valid_o,
  output logic [$clog2(W)-1:0]    grant_o,
  output logic [$clog2(W)-1:0]    prio_group_o,
  output logic                    switch_o,
  output logic                    timeout_o
);
  localparam int unsigned NG  = W / FG;
  localparam int unsigned GB  = (NG > 1) ? $clog2(NG) : 1;
  localparam int unsigned FB  = (FG > 1) ? $clog2(FG) : 1;
  localparam int unsigned WB_ = $clog2(W);
  localparam int unsigned TB  = $clog2(TIMEOUT + 1);

  logic [GB-1:0]          pg_q;
  logic [NG-1:0][FB-1:0]  ptr_q;
  logic [TB-1:0]          tcnt_q;
  logic [GB-1:0]          sel_g;
  logic [FB-1:0]          sel_o;

  always_comb begin
    logic found;
    found = 1'b0;
    sel_g = '0;
    sel_o = '0;
    for (int gi = 0; gi < NG; gi++) begin
      int unsigned g;
      g = (int'(pg_q) + gi) % NG;
      for (int oi = 0; oi < FG; oi++) begin
        int unsigned o;
        o = (int'(ptr_q[g]) + oi) % FG;
        if (!found && ready_i[g*FG + o]) begin
          found = 1'b1;
          sel_g = GB'(g);
          sel_o = FB'(o);
        end
      end
    end
    grant_valid_o = found;
    grant_o       = WB_'(int'(sel_g) * FG + int'(sel_o));
  end

  logic all_stalled;
  always_comb begin
    all_stalled = 1'b1;
    for (int o = 0; o < FG; o++)
      if (!stalled_i[int'(pg_q) * FG + o]) all_stalled = 1'b0;
  end

  assign timeout_o    = (NG > 1) && (tcnt_q >= TB'(TIMEOUT));
  assign switch_o     = (NG > 1) && (all_stalled || timeout_o);
  assign prio_group_o = WB_'(pg_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pg_q   <= '0;
      ptr_q  <= '0;
      tcnt_q <= '0;
    end else begin
      if (take_i && grant_valid_o)
        ptr_q[sel_g] <= FB'((int'(sel_o) + 1) % FG);
      if (switch_o) begin
        pg_q   <= GB'((int'(pg_q) + 1) % NG);
        tcnt_q <= '0;
      end else if (take_i && grant_valid_o && sel_g == pg_q) begin
        tcnt_q <= tcnt_q + 1'b1;
      end
    end
  end
endmodule
