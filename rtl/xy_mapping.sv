// xy_mapping: discovers how the sensor blocks are joined and builds the
// block-grid map used by coordinate_translation.
//
// 1. Adjacency. For each internal address A in 0..max_internal_address the
//    module switches A's neighbor-detect output on, asks every other block
//    B which of its neighbor-detect inputs is high (SENSE_NEIGHBORS), and
//    records "edge e of B touches A" in B's adjacency entry, then switches
//    A's output off. Each block has four entries {valid, address}, one per
//    edge (top, right, bottom, left).
// 2. FPGA attachment. The FPGA's own neighbor-detect pin is raised and all
//    blocks are asked again; the block that sees it, and on which edge, is
//    kept as {address, side}. If nobody sees it, map_error is set and an
//    empty map is published.
// 3. Placement. The FPGA-attached block gets (X,Y) = (0,0) and the rotation
//    that puts the FPGA above it (FPGA on top -> 0, left -> 1, bottom -> 2,
//    right -> 3 quarter turns clockwise). Then, in passes over the address
//    space, every placed block that has not been used as a base places its
//    unplaced neighbours: local edge e of a block with rotation r faces
//    world direction d = (e + r) mod 4 (0 up = +Y, 1 right = +X, 2 down,
//    3 left); the neighbour goes one gcell that way, and if its own edge e'
//    is the one touching the base, its rotation is (d + 2 - e') mod 4.
//    Passes stop when every block is placed or a pass places nothing.
// 4. Publication. One pass finds Xmin/Ymin/Xmax/Ymax, the back frame of
//    the coordinate translation grid is cleared, each placed block A is
//    written as {1, rotation, A} at gcell (X - Xmin, Y - Ymin), and ct_set
//    swaps frames. max_x/max_y are the grid bounds. done pulses for one
//    clock.
//
// I2C commands go out as a one-clock i2c_start with i2c_command and
// i2c_address; the module waits for i2c_done to fall and rise again. The
// whole run takes (max+1)^2 + 2(max+1) + (max+1) commands.
//
// Steps and table formats follow the document. The direction and rotation
// arithmetic, the 2-bit FPGA side and keeping the tables in registers
// rather than block RAM are this design's own.
module xy_mapping
  import tp_pkg::*;
#(
  parameter int unsigned N           = 4,
  parameter int unsigned COMMAND_LEN = 5
) (
  input  logic                   clk,
  input  logic                   reset,
  input  logic                   start,
  input  logic [N-1:0]           max_internal_address,
  output logic                   done,
  output logic                   map_error,
  // command port towards i2c_commands
  output logic                   i2c_start,
  output logic [COMMAND_LEN-1:0] i2c_command,
  output logic [N-1:0]           i2c_address,
  input  logic                   i2c_done,
  input  logic [7:0]             i2c_return_data,
  output logic                   fpga_neighbor_detect,
  // write port of the coordinate translation grid
  output logic                   ct_we,
  output logic [N-1:0]           ct_x,
  output logic [N-1:0]           ct_y,
  output logic [N+2:0]           ct_data,
  output logic                   ct_set,
  output logic [N-1:0]           max_x,
  output logic [N-1:0]           max_y
);

  localparam int unsigned DEPTH = 2 ** N;
  typedef logic signed [N:0] coord_t;

  // adjacency table
  logic         adj_v [DEPTH][4];
  logic [N-1:0] adj_a [DEPTH][4];
  // placement table {valid, rotation, X, Y} and the used flags
  logic         p_valid [DEPTH];
  logic [1:0]   p_rot   [DEPTH];
  coord_t       p_x     [DEPTH];
  coord_t       p_y     [DEPTH];
  logic         p_used  [DEPTH];

  logic [N-1:0] fpga_addr;
  logic [1:0]   fpga_side;
  logic         fpga_found;

  typedef enum logic [4:0] {
    M_IDLE, M_ND_HIGH, M_SENSE, M_SENSE_STORE, M_ND_LOW, M_NEXT_DRV,
    M_FPGA_SENSE, M_FPGA_STORE, M_PLACE_ROOT, M_WALK, M_WALK_EDGE, M_WALK_NEXT,
    M_MIN, M_CLEAR, M_WRITE, M_SET, M_CMD_BUSY, M_CMD_WAIT
  } mstate_e;
  mstate_e state, after_cmd;

  logic [N-1:0] drv, snd, base;
  logic [1:0]   edge_i;
  logic         progress;
  logic [2*N-1:0] gcell;
  coord_t       xmin, ymin, xmax, ymax;

  // neighbour on the current edge of the current base block
  logic [N-1:0] nb;
  logic [1:0]   dir, nb_edge, nb_rot;
  coord_t       nb_x, nb_y;
  always_comb begin
    nb      = adj_a[base][edge_i];
    dir     = edge_i + p_rot[base];
    nb_edge = 2'd0;
    for (int e = 3; e >= 0; e--)
      if (adj_v[nb][e] && adj_a[nb][e] == base) nb_edge = 2'(e);
    nb_rot  = dir + 2'd2 - nb_edge;
    nb_x    = p_x[base];
    nb_y    = p_y[base];
    unique case (dir)
      2'd0: nb_y = p_y[base] + 1'b1;
      2'd1: nb_x = p_x[base] + 1'b1;
      2'd2: nb_y = p_y[base] - 1'b1;
      default: nb_x = p_x[base] - 1'b1;
    endcase
  end

  function automatic logic [3:0] nd_edges(input logic [7:0] r);
    logic [3:0] e;
    for (int k = 0; k < 4; k++) e[k] = r[nd_bit(2'(k))];
    return e;
  endfunction

  logic [3:0] rx_edges;
  assign rx_edges = nd_edges(i2c_return_data);

  logic all_placed;
  always_comb begin
    all_placed = 1'b1;
    for (int a = 0; a < DEPTH; a++)
      if (a <= int'(max_internal_address) && !p_valid[a]) all_placed = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= M_IDLE;
      after_cmd <= M_IDLE;
      done <= 1'b0; map_error <= 1'b0;
      i2c_start <= 1'b0; i2c_command <= '0; i2c_address <= '0;
      fpga_neighbor_detect <= 1'b0;
      ct_we <= 1'b0; ct_x <= '0; ct_y <= '0; ct_data <= '0; ct_set <= 1'b0;
      max_x <= '0; max_y <= '0;
      drv <= '0; snd <= '0; base <= '0; edge_i <= '0; progress <= 1'b0; gcell <= '0;
      xmin <= '0; ymin <= '0; xmax <= '0; ymax <= '0;
      fpga_addr <= '0; fpga_side <= '0; fpga_found <= 1'b0;
      for (int a = 0; a < DEPTH; a++) begin
        p_valid[a] <= 1'b0; p_rot[a] <= '0; p_x[a] <= '0; p_y[a] <= '0; p_used[a] <= 1'b0;
        for (int e = 0; e < 4; e++) begin adj_v[a][e] <= 1'b0; adj_a[a][e] <= '0; end
      end
    end else begin
      done      <= 1'b0;
      i2c_start <= 1'b0;
      ct_we     <= 1'b0;
      ct_set    <= 1'b0;
      unique case (state)
        M_IDLE: if (start) begin
          for (int a = 0; a < DEPTH; a++) begin
            p_valid[a] <= 1'b0; p_used[a] <= 1'b0;
            for (int e = 0; e < 4; e++) adj_v[a][e] <= 1'b0;
          end
          map_error  <= 1'b0;
          fpga_found <= 1'b0;
          drv        <= '0;
          state      <= M_ND_HIGH;
        end
        // ---- adjacency -------------------------------------------------
        M_ND_HIGH: begin
          i2c_start   <= 1'b1;
          i2c_command <= CMD_NEIGHBOR_DETECT_HIGH;
          i2c_address <= drv;
          snd         <= '0;
          after_cmd   <= M_SENSE;
          state       <= M_CMD_BUSY;
        end
        M_SENSE: begin
          if (snd == drv) begin
            if (snd == max_internal_address) state <= M_ND_LOW;
            else snd <= snd + 1'b1;
          end else begin
            i2c_start   <= 1'b1;
            i2c_command <= CMD_SENSE_NEIGHBORS;
            i2c_address <= snd;
            after_cmd   <= M_SENSE_STORE;
            state       <= M_CMD_BUSY;
          end
        end
        M_SENSE_STORE: begin
          for (int e = 0; e < 4; e++)
            if (rx_edges[e]) begin
              adj_v[snd][e] <= 1'b1;
              adj_a[snd][e] <= drv;
            end
          if (snd == max_internal_address) state <= M_ND_LOW;
          else begin
            snd   <= snd + 1'b1;
            state <= M_SENSE;
          end
        end
        M_ND_LOW: begin
          i2c_start   <= 1'b1;
          i2c_command <= CMD_NEIGHBOR_DETECT_LOW;
          i2c_address <= drv;
          after_cmd   <= M_NEXT_DRV;
          state       <= M_CMD_BUSY;
        end
        M_NEXT_DRV: begin
          snd <= '0;
          if (drv == max_internal_address) begin
            fpga_neighbor_detect <= 1'b1;
            state                <= M_FPGA_SENSE;
          end else begin
            drv   <= drv + 1'b1;
            state <= M_ND_HIGH;
          end
        end
        // ---- FPGA attachment -------------------------------------------
        M_FPGA_SENSE: begin
          i2c_start   <= 1'b1;
          i2c_command <= CMD_SENSE_NEIGHBORS;
          i2c_address <= snd;
          after_cmd   <= M_FPGA_STORE;
          state       <= M_CMD_BUSY;
        end
        M_FPGA_STORE: begin
          if (!fpga_found && rx_edges != 4'b0000) begin
            fpga_found <= 1'b1;
            fpga_addr  <= snd;
            for (int e = 3; e >= 0; e--)
              if (rx_edges[e]) fpga_side <= 2'(e);
          end
          if (snd == max_internal_address) begin
            fpga_neighbor_detect <= 1'b0;
            state                <= M_PLACE_ROOT;
          end else begin
            snd   <= snd + 1'b1;
            state <= M_FPGA_SENSE;
          end
        end
        // ---- placement -------------------------------------------------
        M_PLACE_ROOT: begin
          if (fpga_found) begin
            p_valid[fpga_addr] <= 1'b1;
            p_rot[fpga_addr]   <= 2'd0 - fpga_side;
            p_x[fpga_addr]     <= '0;
            p_y[fpga_addr]     <= '0;
          end else begin
            map_error <= 1'b1;
          end
          base     <= '0;
          progress <= 1'b0;
          state    <= fpga_found ? M_WALK : M_MIN;
        end
        M_WALK: begin
          if (p_valid[base] && !p_used[base]) begin
            edge_i <= '0;
            state  <= M_WALK_EDGE;
          end else begin
            state <= M_WALK_NEXT;
          end
        end
        M_WALK_EDGE: begin
          if (adj_v[base][edge_i] && !p_valid[nb]) begin
            p_valid[nb] <= 1'b1;
            p_rot[nb]   <= nb_rot;
            p_x[nb]     <= nb_x;
            p_y[nb]     <= nb_y;
            progress    <= 1'b1;
          end
          edge_i <= edge_i + 1'b1;
          if (edge_i == 2'd3) begin
            p_used[base] <= 1'b1;
            state        <= M_WALK_NEXT;
          end
        end
        M_WALK_NEXT: begin
          if (base == max_internal_address) begin
            base     <= '0;
            progress <= 1'b0;
            if (all_placed || !progress) state <= M_MIN;
            else state <= M_WALK;
          end else begin
            base  <= base + 1'b1;
            state <= M_WALK;
          end
        end
        // ---- publication -----------------------------------------------
        M_MIN: begin
          if (base == '0) begin
            xmin <= '0; ymin <= '0; xmax <= '0; ymax <= '0;
          end
          if (p_valid[base]) begin
            if (base == '0 || p_x[base] < xmin) xmin <= p_x[base];
            if (base == '0 || p_y[base] < ymin) ymin <= p_y[base];
            if (base == '0 || p_x[base] > xmax) xmax <= p_x[base];
            if (base == '0 || p_y[base] > ymax) ymax <= p_y[base];
          end
          if (base == max_internal_address) begin
            base  <= '0;
            gcell  <= '0;
            state <= M_CLEAR;
          end else begin
            base <= base + 1'b1;
          end
        end
        M_CLEAR: begin
          ct_we   <= 1'b1;
          ct_x    <= gcell[2*N-1:N];
          ct_y    <= gcell[N-1:0];
          ct_data <= '0;
          gcell    <= gcell + 1'b1;
          if (gcell == '1) state <= M_WRITE;
        end
        M_WRITE: begin
          if (p_valid[base]) begin
            ct_we   <= 1'b1;
            ct_x    <= N'(p_x[base] - xmin);
            ct_y    <= N'(p_y[base] - ymin);
            ct_data <= {1'b1, p_rot[base], base};
          end
          if (base == max_internal_address) state <= M_SET;
          else base <= base + 1'b1;
        end
        M_SET: begin
          ct_set <= 1'b1;
          max_x  <= map_error ? '0 : N'(xmax - xmin);
          max_y  <= map_error ? '0 : N'(ymax - ymin);
          done   <= 1'b1;
          state  <= M_IDLE;
        end
        // ---- command handshake -----------------------------------------
        M_CMD_BUSY: if (!i2c_done && !i2c_start) state <= M_CMD_WAIT;
        default:    if (i2c_done) state <= after_cmd;   // M_CMD_WAIT
      endcase
    end
  end

endmodule
